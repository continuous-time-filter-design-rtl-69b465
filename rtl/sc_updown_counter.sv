// sc_updown_counter: saturating up/down counter, the integrator of every
// stochastic first-order system.
//
// Each clock it adds the signed step delta_i to its value. The result is
// clamped to 0..2^WIDTH-1 so that the value, read as a probability
// value/2^WIDTH, never wraps. The counter's value is also the digital
// output of a filter stage. Integrating the error with an up/down counter
// follows the source design; saturation, the signed-step interface and the
// reset value INIT are this design's own choices.
//
// Interface: delta_i is a DW-bit two's complement step, applied at the
// next rising clock edge. count_o is the register. Reset is asynchronous,
// active low.
module sc_updown_counter #(
  parameter int unsigned WIDTH = 14,
  parameter int unsigned DW    = 4,
  parameter logic [WIDTH-1:0] INIT = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] delta_i,
  output logic [WIDTH-1:0]     count_o,
  output logic                 sat_o     // this clock's step was clamped
);
  localparam int unsigned EW = ((WIDTH > DW) ? WIDTH : DW) + 2;
  localparam logic signed [EW-1:0] MAXV = EW'((64'd1 << WIDTH) - 64'd1);

  logic [WIDTH-1:0]     cnt;
  logic signed [EW-1:0] sum;
  logic [WIDTH-1:0]     nxt;

  always_comb begin
    sum   = EW'(signed'({1'b0, cnt})) + EW'(delta_i);
    sat_o = 1'b0;
    if (sum < 0) begin
      nxt   = '0;
      sat_o = 1'b1;
    end else if (sum > MAXV) begin
      nxt   = '1;
      sat_o = 1'b1;
    end else begin
      nxt   = sum[WIDTH-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= INIT;
    else        cnt <= nxt;
  end

  assign count_o = cnt;
endmodule
