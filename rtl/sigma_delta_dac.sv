// First-order sigma-delta modulator for one analog output channel.
//
// Turns a signed sample into a one-bit stream whose density of ones equals
// (x + 2^(W-1)) / 2^W; an external RC low-pass turns the stream back into a
// voltage. The input is offset to unsigned and added every clock to a W-bit
// accumulator; the carry out of that addition is the output bit. The
// simulator's interface card provides sigma-delta D/A outputs; their
// modulator structure and width are choices of this design. The input is
// sampled every clock; the output bit is registered.
module sigma_delta_dac #(
  parameter int unsigned W = 16      // sample width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,     // signed sample, full scale +/-2^(W-1)
  output logic                bit_o  // one-bit output stream
);

  logic [W-1:0] acc_q;
  logic [W:0]   sum;

  always_comb sum = {1'b0, acc_q} + {1'b0, ~x[W-1], x[W-2:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      bit_o <= 1'b0;
    end else begin
      acc_q <= sum[W-1:0];
      bit_o <= sum[W];
    end
  end

endmodule
