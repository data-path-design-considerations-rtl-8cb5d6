// regfile: the 138 x 40-bit windowed register file.
//
// Two read ports (A and B) and one write port, as in the document: reading
// is double-ported, writing single-ported. One clock of this model is one
// pipeline cycle. At the end of the Ifetch cycle the RA and RB address
// latches capture the two source addresses from busI and the window pointer
// from busCWP (the document latches them in phi3 and decodes in phi4). During
// the following Exec cycle the selected rows appear on bitline_a/bitline_b
// (the document's phi1 read). The write of the instruction in its Write stage
// happens at the end of that cycle (the document's phi3 write), so a row read
// and written in the same cycle returns its old value; the DST2 forwarding
// path covers that case. While hold is high the latches keep their contents
// and no write takes place. The array is a plain memory without reset.
module regfile
  import spur_pkg::*;
#(
  parameter int NROWS = NREGS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   hold,
  // read addresses, Ifetch stage
  input  raddr_t rs1,
  input  raddr_t rs2,
  input  cwp_t   cwp,
  // write port, Write stage
  input  logic   we,
  input  raddr_t wr_addr,
  input  cwp_t   wr_cwp,
  input  word_t  wr_data,
  // read data, Exec stage
  output word_t  bitline_a,
  output word_t  bitline_b
);
  word_t  mem [NROWS];
  paddr_t ra_row, rb_row, wr_row;
  paddr_t ra_q, rb_q;

  window_decoder u_dec_a (.addr(rs1),     .cwp(cwp),    .row(ra_row));
  window_decoder u_dec_b (.addr(rs2),     .cwp(cwp),    .row(rb_row));
  window_decoder u_dec_w (.addr(wr_addr), .cwp(wr_cwp), .row(wr_row));

  // RA / RB latches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_q <= '0;
      rb_q <= '0;
    end else if (!hold) begin
      ra_q <= ra_row;
      rb_q <= rb_row;
    end
  end

  always_ff @(posedge clk) begin
    if (we && !hold && int'(wr_row) < NROWS) mem[wr_row] <= wr_data;
  end

  assign bitline_a = (int'(ra_q) < NROWS) ? mem[ra_q] : '0;
  assign bitline_b = (int'(rb_q) < NROWS) ? mem[rb_q] : '0;
endmodule
