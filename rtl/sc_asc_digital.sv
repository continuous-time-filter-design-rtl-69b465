// sc_asc_digital: digital half of the analog-to-stochastic converter.
//
// Off chip, the converter's own output stream is smoothed by an RC
// integrator and compared with the analog input; the comparator output,
// a PWM signal, comes in on cmp_i. Here it is synchronised by two flip-
// flops and integrated by an N-bit up/down counter (+1 while the input is
// above the integrated stream, -1 otherwise), and a DSC turns the counter
// into the output stream stream_o, which goes both to the filters and
// back to the RC integrator. The loop makes the stream's mean follow the
// analog input (0..1 of the RC's full scale) as a first-order system with
//   tau = 2^N / Fclk.
// The loop structure follows the source design; the synchroniser, the
// +1/-1 stepping, saturation and the reset value (mid-scale) are this
// design's own choices.
//
// Interface: cmp_i is asynchronous. stream_o is combinational from
// registers; count_o is the converter's digital value, count_o/2^N.
// Three clocks from a change on cmp_i to the counter. Reset is
// asynchronous, active low.
module sc_asc_digital #(
  parameter int unsigned N = 8,
  parameter logic [N-1:0] SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmp_i,
  output logic         stream_o,
  output logic [N-1:0] count_o,
  output logic         sat_o
);
  logic [1:0]        sync;
  logic signed [1:0] delta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[0], cmp_i};
  end

  assign delta = sync[1] ? 2'sd1 : -2'sd1;

  sc_updown_counter #(.WIDTH(N), .DW(2), .INIT(N'(1) << (N - 1))) u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .delta_i (delta),
    .count_o (count_o),
    .sat_o   (sat_o)
  );

  sc_dsc #(.WIDTH(N), .SEED(SEED)) u_dsc (
    .clk     (clk),
    .rst_n   (rst_n),
    .value_i (count_o),
    .pulse_o (stream_o)
  );
endmodule
