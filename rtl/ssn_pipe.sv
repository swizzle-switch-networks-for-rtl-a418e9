// One register stage of global wire between a switch read buffer and the
// receiving cache: the cycle a signal needs to cross the chip. The valid bit
// is reset; the payload is only loaded with a valid beat. Latency is one
// cycle, throughput one beat per cycle; there is no backpressure, as the
// network has no buffering on its output side. Modelling the wire delay as a
// single register is this design's choice.
module ssn_pipe #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d_valid,
  input  logic [WIDTH-1:0] d,
  output logic             q_valid,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q       <= '0;
    end else begin
      q_valid <= d_valid;
      if (d_valid) q <= d;
    end
  end

endmodule
