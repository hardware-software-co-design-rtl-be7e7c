// bfast_tp_controller: TPController, the scan controller of one text segment.
//
// Controller ID scans the segment that starts ID*SEG bytes after the scan's
// start address. It keeps TextPoint, the address of the rightmost 4-byte
// block of its 8-byte search window, and moves through four states:
//   INIT  until a scan starts (from any state, `start` loads the segment);
//         then SCAN with the window at the segment start, or straight to
//         HOLD if not even one window fits in the segment.
//   SCAN  each query result shifts the window by the shift distance; a shift
//         of 0 (the block is in G0) enters CHECK; when the window end passes
//         the segment limit the controller goes to HOLD.
//   CHECK walks the window from right to left, TextPoint-- and i++ per query,
//         requiring the block at step i to be in group Gi. A miss returns to
//         SCAN with the window one byte to the right of where CHECK began.
//         After eight hits one more pipeline pass checks i >= 8 and enters
//         HOLD with a possible match.
//   HOLD  keeps the result. With a possible match it spends one last pass
//         reporting it (found goes high at that pass's write-back).
// Disabling the scan returns the controller to INIT from any state; `stop`
// (another controller found a match) freezes it in HOLD.
//
// The segment limit lets a window start anywhere in the segment, so the last
// windows reach up to WIN-1 bytes into the next segment; a pattern crossing a
// segment boundary is thus still found. A scan without matches therefore
// takes the same number of queries as one that stops exactly at the segment
// end. This overlap, the resume-at-one-byte rule after a failed CHECK and the
// exact reporting pass are this design's reading of the description, which
// gives the states, the transitions and the 55-cycle cost of a match.
//
// Timing: `req` asks for the current pipeline slot; wb_valid marks, four
// cycles after the slot, the result of that query (hit vector, shift).
module bfast_tp_controller
  import bfast_pkg::*;
#(
  parameter int unsigned ID  = 0,           // segment number
  parameter int unsigned SEG = SEG_BYTES    // bytes per segment
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,      // "BFAST* enable" for the TextRam being scanned
  input  logic       start,       // a scan starts this cycle (enable is high)
  input  ptr_t       base,        // scan start address (held while enabled)
  input  ptr_t       limit,       // scan start + length (held while enabled)
  input  logic       stop,        // another controller reported a match
  output logic       req,         // wants its pipeline slot
  output ptr_t       text_point,  // block address for the TP stage
  input  logic       wb_valid,    // result of this controller's query
  input  group_vec_t wb_hit,
  input  shift_t     wb_shift,
  output tpc_state_t state,
  output logic       done,        // in HOLD, nothing left to report
  output logic       found,       // reported a possible match
  output ptr_t       win_start    // window start of the reported match
);

  localparam int unsigned BLK = BLOCK_BYTES;
  localparam int unsigned WIN = WIN_BYTES;

  ptr_t       seg_start, seg_end, seg_lim, tp_next;
  logic [3:0] i;
  logic       report;

  assign seg_start = base + ptr_t'(ID * SEG);
  assign seg_end   = seg_start + ptr_t'(SEG + WIN - 1);
  assign seg_lim   = (seg_end < limit) ? seg_end : limit;

  // TextPoint after a SCAN shift or after a failed CHECK
  always_comb begin
    if (state == TPC_CHECK) tp_next = text_point + ptr_t'(i) + ptr_t'(1);
    else                    tp_next = text_point + ptr_t'(wb_shift);
  end

  assign req  = (state == TPC_SCAN) || (state == TPC_CHECK) ||
                (state == TPC_HOLD && report);
  assign done = (state == TPC_HOLD) && !report;
  assign win_start = text_point + ptr_t'(BLK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= TPC_INIT;
      text_point <= '0;
      i          <= '0;
      report     <= 1'b0;
      found      <= 1'b0;
    end else if (!enable) begin
      state  <= TPC_INIT;
      i      <= '0;
      report <= 1'b0;
      found  <= 1'b0;
    end else if (start) begin
      text_point <= seg_start + ptr_t'(BLK);
      i          <= '0;
      report     <= 1'b0;
      found      <= 1'b0;
      // first window end = seg_start + WIN - 1 must lie below the limit
      state <= (seg_start + ptr_t'(WIN) <= seg_lim) ? TPC_SCAN : TPC_HOLD;
    end else begin
      unique case (state)
        TPC_INIT: state <= TPC_INIT;   // wait for a start
        TPC_SCAN: begin
          if (stop) state <= TPC_HOLD;
          else if (wb_valid) begin
            if (wb_shift == '0) begin
              state <= TPC_CHECK;
              i     <= '0;
            end else begin
              text_point <= tp_next;
              if (tp_next + ptr_t'(BLK - 1) >= seg_lim) state <= TPC_HOLD;
            end
          end
        end
        TPC_CHECK: begin
          if (stop) state <= TPC_HOLD;
          else if (wb_valid) begin
            if (i >= 4'(N_GROUPS)) begin
              // every block hit its group: possible match
              state  <= TPC_HOLD;
              report <= 1'b1;
            end else if (wb_hit[i[2:0]]) begin
              text_point <= text_point - ptr_t'(1);
              i          <= i + 4'd1;
            end else begin
              text_point <= tp_next;
              i          <= '0;
              state <= (tp_next + ptr_t'(BLK - 1) >= seg_lim) ? TPC_HOLD : TPC_SCAN;
            end
          end
        end
        TPC_HOLD: begin
          if (report && wb_valid) begin
            report <= 1'b0;
            found  <= 1'b1;
          end
        end
        default: state <= TPC_INIT;
      endcase
    end
  end

endmodule
