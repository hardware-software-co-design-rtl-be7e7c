// bfast_text_point: TextPoint stage (TP), first stage of the scan pipeline.
//
// The five TPControllers share one pipeline of five stages; each controller
// owns every fifth cycle, so each controller has exactly one query in flight
// and sees its result just before its next turn. A slot counter runs
// 0,1,..,N-1,0,.. and is cleared by `restart` when a scan starts, so that
// controller k always issues at cycles k, k+N, k+2N.. after the start. In its
// cycle the TextPoint of the owning controller is driven as the TextRam read
// address, if that controller requests a query.
//
// Timing: outputs are combinational from the slot counter and the
// controllers' TextPoints (the TextRam registers the address). The
// time-multiplexing follows the five-stage pipeline diagram of the
// description; clearing the counter at start is this design's choice.
module bfast_text_point
  import bfast_pkg::*;
#(
  parameter int unsigned N = N_TPC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,     // scan starts: slot 0 next cycle
  input  logic [N-1:0]         req,         // controller wants a query
  input  ptr_t                 tp [N],      // controllers' TextPoints
  output logic                 issue,       // a query enters the pipeline
  output logic [$clog2(N)-1:0] slot,        // owning controller
  output text_addr_t           addr         // TextRam read address
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                slot <= '0;
    else if (restart || slot == $clog2(N)'(N - 1)) slot <= '0;
    else                                       slot <= slot + 1'b1;
  end

  assign issue = !restart && req[slot];
  assign addr  = tp[slot][TEXT_AW-1:0];

endmodule
