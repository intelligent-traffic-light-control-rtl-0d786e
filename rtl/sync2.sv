// Two-flop synchroniser for a bundle of asynchronous level inputs.
//
// The queue detectors are independent of the controller clock; each line
// passes through two flip-flops before the state machine sees it, which
// delays it by two clock cycles. rst (synchronous, active high) loads
// RESET_VAL. This helper is not part of the original design; it is the
// usual guard against metastability on sensor inputs.
module sync2 #(
  parameter int unsigned       WIDTH     = 1,
  parameter logic [WIDTH-1:0]  RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
