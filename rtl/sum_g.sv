// sum_g: SUM_G, an N-bit binary ripple-carry adder, s = (a + b) mod 2^N.
//
// Used in the gate-level MGC for the correcting addition that Rn requests
// after non-restoring division. Written as an explicit carry chain of full
// adders; the carry out of the top bit is dropped. Combinational.
module sum_g #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N-1:0] c;   // c[i]: carry into bit i
  assign c[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_bit
    assign s[i] = a[i] ^ b[i] ^ c[i];
    if (i + 1 < N) begin : g_cy
      assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
    end
  end
endmodule
