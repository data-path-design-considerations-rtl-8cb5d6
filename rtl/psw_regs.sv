// psw_regs: the kernel and user processor status word registers.
//
// UPSW and KPSW are loaded from busD at the end of an Exec cycle when we is
// set (sel chooses which) and are read out on busS, chosen by rd_sel. The
// document places them in the lower data path next to busD and busS but does
// not give their fields; the full 40-bit width and the reset value of zero are
// this design's.
module psw_regs
  import spur_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold,
  input  logic  we,
  input  logic  sel,      // 0 = UPSW, 1 = KPSW
  input  word_t wdata,
  input  logic  rd_sel,
  output word_t rdata,
  output word_t upsw,
  output word_t kpsw
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upsw <= '0;
      kpsw <= '0;
    end else if (we && !hold) begin
      if (sel) kpsw <= wdata;
      else     upsw <= wdata;
    end
  end
  assign rdata = rd_sel ? kpsw : upsw;
endmodule
