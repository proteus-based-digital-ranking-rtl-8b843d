// reset_control: turns the reset switch into the clear of all logic.
// The self-resetting reset switch gives a high pulse when pressed. While it
// is high, rst_n is held low at once (asynchronously), clearing every
// register and counter; after it falls, rst_n returns high two clk cycles
// later, in step with the clock. Active-high switch, active-low clear.
module reset_control (
  input  logic clk,
  input  logic reset_sw,
  output logic rst_n
);
  logic [1:0] sync;
  always_ff @(posedge clk or posedge reset_sw) begin
    if (reset_sw) sync <= 2'b00;
    else          sync <= {sync[0], 1'b1};
  end
  assign rst_n = sync[1];
endmodule
