// encoded_state_reg: the sequential part of the encoded circuit. It replaces
// the k flip-flops of the original state by n flip-flops holding the encoded
// and masked state z, together with the r-bit register that keeps the mask y
// that was used to write z (the flip-flop in front of the comparator).
// Reset, asynchronous and active low, loads z = x0*G (the encoded reset state
// of the original circuit, mask zero) and y = 0, so reset is equivalent to
// the original circuit's reset. A synchronous recover request loads the same
// values on the next edge; it is driven by the alarm to give the "global
// reset" recovery. Timing: one clock edge from d/y_in to z/y_q.
module encoded_state_reg #(
  parameter int           N           = 123,
  parameter int           R           = 14,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         recover,
  input  logic [N-1:0] z_d,
  input  logic [R-1:0] y_d,
  output logic [N-1:0] z_q,
  output logic [R-1:0] y_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_q <= RESET_VALUE;
      y_q <= '0;
    end else if (recover) begin
      z_q <= RESET_VALUE;
      y_q <= '0;
    end else begin
      z_q <= z_d;
      y_q <= y_d;
    end
  end
endmodule
