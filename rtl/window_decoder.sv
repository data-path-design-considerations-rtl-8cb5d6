// window_decoder: overlapping-window register address mapping.
//
// Turns a 5-bit logical register address and the 3-bit window pointer into a
// physical row of the 138-row register array. Globals (0-9) map to rows 0-9 in
// every window. Window w owns 16 rows starting at 10 + 16*w: its ten locals
// (addresses 16-25) and its six "overlap with child" registers (10-15). The
// six "overlap with parent" registers (26-31) of window w are the rows that
// window w+1 (mod 8) sees as its overlap-with-child registers; the two logical
// addresses of a shared row differ only in bit 4, as in the document's
// numbering. Which window of a pair is "parent" follows the pairing printed in
// the document's predecoder (Wn with N4*, Wn-1 with N4); the rest of the row
// layout is this design's choice. Purely combinational.
module window_decoder
  import spur_pkg::*;
(
  input  raddr_t addr,
  input  cwp_t   cwp,
  output paddr_t row
);
  localparam int WIN_ROWS = NLOCAL + NOVL;

  cwp_t owner;   // window whose 16-row group holds the register
  logic [3:0] offset;

  always_comb begin
    owner  = cwp;
    offset = '0;
    if (addr < OWC_FIRST) begin
      row = paddr_t'(addr);                        // global
    end else begin
      if (addr >= OWP_FIRST) begin
        owner  = cwp + cwp_t'(1);                  // shared with the parent window
        offset = 4'(NLOCAL) + 4'(addr - OWP_FIRST);
      end else if (addr >= LOCAL_FIRST) begin
        offset = 4'(addr - LOCAL_FIRST);
      end else begin
        offset = 4'(NLOCAL) + 4'(addr - OWC_FIRST);
      end
      row = paddr_t'(NGLOBAL) + paddr_t'(owner) * paddr_t'(WIN_ROWS) + paddr_t'(offset);
    end
  end
endmodule
