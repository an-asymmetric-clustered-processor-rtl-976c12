// icc_pipe: inter-cluster communication delay.
//
// Carries a valid-qualified item of any type T from one cluster to the
// other in exactly LAT cycles of the fast clock (LAT >= 1), one item per
// cycle: register writes, descriptor updates and replay payloads. The
// document's latency is two slow cycles, which is four fast cycles. Reset
// clears the valid bits.
module icc_pipe #(
  parameter type T   = logic [7:0],
  parameter int  LAT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  T     in_data,
  output logic out_valid,
  output T     out_data
);
  logic [LAT-1:0] v_q;
  T               d_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      for (int i = 0; i < LAT; i++) d_q[i] <= T'(0);
    end else begin
      v_q[0] <= in_valid;
      d_q[0] <= in_data;
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1];
        d_q[i] <= d_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign out_data  = d_q[LAT-1];
endmodule
