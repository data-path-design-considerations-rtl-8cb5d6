// clkgen4: four-phase non-overlapping clock generator.
//
// Divides a master clock into phi1..phi4. Each phase is high for PHASE_TICKS
// master cycles and is followed by GAP_TICKS cycles with all phases low. With
// a 200 MHz (5 ns) master clock the defaults give the document's timing:
// 25 ns phases, 10 ns non-overlap, a 140 ns cycle. cycle_end pulses in the
// last master cycle of phi4's gap and is the pipeline's advance strobe in
// this design. How the chip's own generator works is not described; the
// counter is this design's. Outputs are registered.
module clkgen4 #(
  parameter int PHASE_TICKS = 5,
  parameter int GAP_TICKS   = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic phi1,
  output logic phi2,
  output logic phi3,
  output logic phi4,
  output logic cycle_end
);
  localparam int SLOT   = PHASE_TICKS + GAP_TICKS;
  localparam int PERIOD = 4 * SLOT;
  localparam int CW     = $clog2(PERIOD);

  logic [CW-1:0] cnt, nxt;
  assign nxt = (int'(cnt) == PERIOD - 1) ? '0 : cnt + 1'b1;

  function automatic logic in_phase(input logic [CW-1:0] t, input int k);
    return (int'(t) >= k * SLOT) && (int'(t) < k * SLOT + PHASE_TICKS);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      phi1      <= 1'b0;
      phi2      <= 1'b0;
      phi3      <= 1'b0;
      phi4      <= 1'b0;
      cycle_end <= 1'b0;
    end else begin
      cnt       <= nxt;
      phi1      <= in_phase(nxt, 0);
      phi2      <= in_phase(nxt, 1);
      phi3      <= in_phase(nxt, 2);
      phi4      <= in_phase(nxt, 3);
      cycle_end <= (int'(nxt) == PERIOD - 1);
    end
  end

  // phases never overlap
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({phi1, phi2, phi3, phi4}));
endmodule
