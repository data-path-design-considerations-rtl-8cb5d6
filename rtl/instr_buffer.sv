// instr_buffer: the on-chip instruction buffer (IB) and its tag store.
//
// A direct-mapped instruction cache of WORDS 32-bit words (512 bytes) in
// BLOCKS sub-blocks of WORDS/BLOCKS words, sizes from the document. A 30-bit
// word address splits into word-in-block (low bits), sub-block index and tag.
// A fetch hits when the sub-block's tag matches and the word's valid bit is
// set; the word is then on instr in the same cycle (the document reads the IB
// in phi2). Words are written one at a time through the fill port at the end
// of the cycle; a fill with a new tag retags the sub-block and leaves only
// the filled word valid. inv_all clears every valid bit. Per-word valid bits,
// the fill port and the flush are this design's: the document gives the
// organisation, not the refill protocol.
module instr_buffer #(
  parameter int WORDS  = 128,
  parameter int BLOCKS = 16,
  parameter int ADDR_W = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inv_all,
  input  logic [ADDR_W-1:0] fetch_addr,
  output logic              hit,
  output logic [31:0]       instr,
  input  logic              fill_en,
  input  logic [ADDR_W-1:0] fill_addr,
  input  logic [31:0]       fill_data
);
  localparam int WPB   = WORDS / BLOCKS;
  localparam int WB    = $clog2(WPB);
  localparam int IB    = $clog2(BLOCKS);
  localparam int TAG_W = ADDR_W - WB - IB;

  logic [31:0]      data  [WORDS];
  logic [TAG_W-1:0] tags  [BLOCKS];
  logic [WPB-1:0]   valid [BLOCKS];

  logic [IB-1:0]    f_idx, w_idx;
  logic [WB-1:0]    f_w, w_w;
  logic [TAG_W-1:0] f_tag, w_tag;

  assign f_w   = fetch_addr[WB-1:0];
  assign f_idx = fetch_addr[WB +: IB];
  assign f_tag = fetch_addr[ADDR_W-1 -: TAG_W];
  assign w_w   = fill_addr[WB-1:0];
  assign w_idx = fill_addr[WB +: IB];
  assign w_tag = fill_addr[ADDR_W-1 -: TAG_W];

  assign hit   = valid[f_idx][f_w] && (tags[f_idx] == f_tag);
  assign instr = data[{f_idx, f_w}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BLOCKS; i++) begin
        valid[i] <= '0;
        tags[i]  <= '0;
      end
    end else if (inv_all) begin
      for (int i = 0; i < BLOCKS; i++) valid[i] <= '0;
    end else if (fill_en) begin
      tags[w_idx] <= w_tag;
      if (tags[w_idx] == w_tag) valid[w_idx][w_w] <= 1'b1;
      else                      valid[w_idx] <= WPB'(1) << w_w;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_en && !inv_all) data[{w_idx, w_w}] <= fill_data;
  end
endmodule
