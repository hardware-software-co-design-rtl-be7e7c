// bfast_regs: the BFAST* registers EnableTextRam0, EnableTextRam1 and
// StatusRegister.
//
// EnableTextRamN = {enable[31], start address[30:13], length[12:0]}: writing
// it with bit 31 set asks for a scan of `length` bytes of TextRamN from
// `start`. A write also clears that TextRam's finished and error flags; a
// request whose start + length exceeds the 8 KB TextRam sets the error flag
// instead (the scan engine does not start a TextRam in error). A length
// field of 0 means a full 8 KB (8192 does not fit in 13 bits).
//
// StatusRegister = {BFAST* enable[24], TextRam0/1 finished[23:22],
// TextRam0/1 scanning[21:20], TextRam0/1 error[19:18], VirusAddress[17:13],
// TextPointer[12:1], FoundVirus[0]}. VirusAddress is one-hot over the five
// TPControllers; TextPointer holds bits 12:1 of the window start of the
// reported match. Field positions follow the register figure of the
// description; the clearing rules and the TextPointer contents are this
// design's choices.
//
// Timing: writes take effect at the clock edge; h_rdata is valid the cycle
// after h_re. Status inputs are sampled every cycle.
module bfast_regs
  import bfast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host port (register number 0..2)
  input  logic        h_we,
  input  logic        h_re,
  input  logic [1:0]  h_sel,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  // to the scan engine
  output enable_reg_t en [2],
  output ptr_t        scan_len [2],   // length with 0 read as 8192
  output logic [1:0]  finished,
  output logic [1:0]  error,
  // from the scan engine
  input  logic [1:0]  scanning,
  input  logic [1:0]  set_finished,
  input  logic [1:0]  set_error,
  input  logic        clear_result,   // a scan starts
  input  logic        result_valid,   // a scan ends
  input  logic [4:0]  result_tpc,
  input  text_addr_t  result_ptr,
  input  logic        result_found
);

  status_reg_t status;
  logic        found_q;
  logic [4:0]  tpc_q;
  logic [11:0] ptr_q;

  for (genvar r = 0; r < 2; r++) begin : g_en
    logic  wr;
    ptr_t  len, req_end;
    assign wr      = h_we && h_sel == 2'(r);
    assign len     = (h_wdata[12:0] == '0) ? ptr_t'(TEXT_BYTES) : ptr_t'(h_wdata[12:0]);
    assign req_end = ptr_t'(h_wdata[30:13]) + len;
    assign scan_len[r] = (en[r].length == '0) ? ptr_t'(TEXT_BYTES) : ptr_t'(en[r].length);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        en[r]       <= '0;
        finished[r] <= 1'b0;
        error[r]    <= 1'b0;
      end else if (wr) begin
        en[r]       <= enable_reg_t'(h_wdata);
        finished[r] <= 1'b0;
        error[r]    <= h_wdata[31] && (h_wdata[30:13] > 18'(TEXT_BYTES) ||
                                       req_end > ptr_t'(TEXT_BYTES));
      end else begin
        if (set_finished[r]) finished[r] <= 1'b1;
        if (set_error[r])    error[r]    <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found_q <= 1'b0;
      tpc_q   <= '0;
      ptr_q   <= '0;
    end else if (clear_result) begin
      found_q <= 1'b0;
      tpc_q   <= '0;
      ptr_q   <= '0;
    end else if (result_valid) begin
      found_q <= result_found;
      tpc_q   <= result_tpc;
      ptr_q   <= result_ptr[12:1];
    end
  end

  always_comb begin
    status               = '0;
    status.bfast_enable  = |scanning;
    status.ram0_finished = finished[0];
    status.ram1_finished = finished[1];
    status.ram0_scanning = scanning[0];
    status.ram1_scanning = scanning[1];
    status.ram0_error    = error[0];
    status.ram1_error    = error[1];
    status.virus_tpc     = tpc_q;
    status.text_pointer  = ptr_q;
    status.found_virus   = found_q;
  end

  always_ff @(posedge clk) begin
    if (h_re) begin
      unique case (h_sel)
        2'(REG_EN0):    h_rdata <= en[0];
        2'(REG_EN1):    h_rdata <= en[1];
        2'(REG_STATUS): h_rdata <= status;
        default:        h_rdata <= '0;
      endcase
    end
  end

endmodule
