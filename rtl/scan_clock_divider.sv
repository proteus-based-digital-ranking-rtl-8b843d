// scan_clock_divider: makes the 10 kHz scan clock of the display.
// A counter of the system clock wraps every CLK_HZ/SCAN_HZ cycles and
// gives a one-cycle tick when it wraps, so tick has the frequency
// SCAN_HZ. The scan rate is the design's; deriving it from the system
// clock, rather than from a separate oscillator, is this design's choice.
module scan_clock_divider #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 10_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned DIV = (CLK_HZ / SCAN_HZ) < 1 ? 1 : (CLK_HZ / SCAN_HZ);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
