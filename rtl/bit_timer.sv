// bit_timer: bit-slot strobe for the single wire bus.
//
// Divides the system clock by BIT_CLKS and pulses `tick` for one clock at the
// end of every bit slot. All nodes of a bus share this strobe, so every node
// samples the wire and changes its write line at the same clock edge. The
// protocol gives no bit timing; a shared clock and strobe is this design's
// choice and stands in for the per-node oscillators of a board-level bus.
//
// Timing: `tick` is high in the last clock of each BIT_CLKS-clock slot; the
// first tick comes BIT_CLKS clocks after reset is released.
module bit_timer #(
  parameter int unsigned BIT_CLKS = 8   // clocks per bit slot, at least 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (BIT_CLKS > 1) ? $clog2(BIT_CLKS) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (cnt == CW'(BIT_CLKS - 1)) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign tick = (cnt == CW'(BIT_CLKS - 1));
endmodule
