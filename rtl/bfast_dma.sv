// bfast_dma: the DMA engine that moves text from system memory into a
// TextRam.
//
// The host programs a source byte address (REG_DMA_SRC) and a control word
// (REG_DMA_CTL = {go[31], TextRam select[30], destination byte offset[26:14],
// length in bytes[13:0]}); writing the control word with go set starts the
// transfer. The engine reads the source as 64-bit beats over a simple
// request/response memory port (the width of the processor local bus) and
// writes each beat into the TextRam as two aligned 32-bit words, with byte
// enables trimming the last word. REG_DMA_STA = {error[2], done[1], busy[0]};
// error means the destination range leaves the 8 KB TextRam or the source or
// destination is not word aligned, in which case nothing is moved.
//
// Timing: one read outstanding at a time: request (held until m_req_ready),
// wait for m_rsp_valid, then two TextRam write cycles. The description gives
// only the function (memory to TextRam transfers driven by the driver); the
// register layout, bus port and sequencing are this design's.
module bfast_dma
  import bfast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host register port (register 0 = SRC, 1 = CTL, 2 = STA)
  input  logic        h_we,
  input  logic        h_re,
  input  logic [1:0]  h_sel,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  // memory read port
  output logic        m_req_valid,
  input  logic        m_req_ready,
  output logic [31:0] m_req_addr,     // 8-byte aligned
  input  logic        m_rsp_valid,
  input  logic [63:0] m_rsp_data,     // byte 0 (lowest address) in bits 7:0
  // TextRam write port
  output logic        d_we,
  output logic        d_ram,
  output logic [TEXT_AW-3:0] d_word,
  output logic [31:0] d_data,
  output logic [3:0]  d_be
);

  typedef enum logic [2:0] {
    D_IDLE, D_REQ, D_WAIT, D_WR_LO, D_WR_HI
  } dma_state_t;

  dma_state_t   state;
  logic [31:0]  src, cur_src;
  logic [31:0]  ctl;
  logic         ram, busy, done, error;
  logic [14:0]  left;        // bytes still to write
  ptr_t         dst;         // next TextRam byte address
  logic [63:0]  beat;
  logic         first_hi;    // source starts in the upper half of a beat

  logic [12:0]  c_dst;
  logic [13:0]  c_len;
  logic         c_bad;
  assign c_dst = h_wdata[26:14];
  assign c_len = h_wdata[13:0];
  assign c_bad = (ptr_t'(c_dst) + ptr_t'(c_len) > ptr_t'(TEXT_BYTES)) ||
                 (c_dst[1:0] != 2'b00) || (src[1:0] != 2'b00);

  function automatic logic [3:0] be_of(logic [14:0] n);
    return (n >= 15'd4) ? 4'hF : 4'((1 << n) - 1);
  endfunction

  // register numbers relative to the DMA's first register
  localparam logic [1:0] R_SRC = 2'(REG_DMA_SRC - REG_DMA_SRC);
  localparam logic [1:0] R_CTL = 2'(REG_DMA_CTL - REG_DMA_SRC);
  localparam logic [1:0] R_STA = 2'(REG_DMA_STA - REG_DMA_SRC);

  assign busy = (state != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= D_IDLE;
      src      <= '0;
      cur_src  <= '0;
      ctl      <= '0;
      ram      <= 1'b0;
      done     <= 1'b0;
      error    <= 1'b0;
      left     <= '0;
      dst      <= '0;
      beat     <= '0;
      first_hi <= 1'b0;
    end else begin
      if (h_we && h_sel == R_SRC && !busy) src <= h_wdata;
      if (h_we && h_sel == R_CTL && !busy) begin
        ctl <= h_wdata;
        if (h_wdata[31]) begin
          done  <= 1'b0;
          error <= c_bad;
          if (!c_bad && c_len != '0) begin
            state    <= D_REQ;
            ram      <= h_wdata[30];
            dst      <= ptr_t'(c_dst);
            left     <= 15'(c_len);
            cur_src  <= src;
            first_hi <= src[2];
          end else if (!c_bad) begin
            done <= 1'b1;
          end
        end
      end
      unique case (state)
        D_IDLE: ;
        D_REQ:  if (m_req_ready) state <= D_WAIT;
        D_WAIT: if (m_rsp_valid) begin
          beat  <= m_rsp_data;
          state <= first_hi ? D_WR_HI : D_WR_LO;
        end
        D_WR_LO: begin
          dst  <= dst + ptr_t'(4);
          left <= (left > 15'd4) ? left - 15'd4 : '0;
          if (left <= 15'd4) begin
            state <= D_IDLE;
            done  <= 1'b1;
          end else state <= D_WR_HI;
        end
        D_WR_HI: begin
          dst      <= dst + ptr_t'(4);
          left     <= (left > 15'd4) ? left - 15'd4 : '0;
          first_hi <= 1'b0;
          cur_src  <= {cur_src[31:3] + 29'd1, 3'b000};
          if (left <= 15'd4) begin
            state <= D_IDLE;
            done  <= 1'b1;
          end else state <= D_REQ;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign m_req_valid = (state == D_REQ);
  assign m_req_addr  = {cur_src[31:3], 3'b000};

  assign d_we   = (state == D_WR_LO) || (state == D_WR_HI);
  assign d_ram  = ram;
  assign d_word = dst[TEXT_AW-1:2];
  assign d_data = (state == D_WR_HI) ? beat[63:32] : beat[31:0];
  assign d_be   = be_of(left);

  always_ff @(posedge clk) begin
    if (h_re) begin
      unique case (h_sel)
        R_SRC:   h_rdata <= src;
        R_CTL:   h_rdata <= ctl;
        R_STA:   h_rdata <= {29'd0, error, done, busy};
        default: h_rdata <= '0;
      endcase
    end
  end

endmodule
