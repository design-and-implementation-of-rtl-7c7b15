// ones_count -- the "Ones" block: number of 1s in an N-bit detector vector.
//
// Purely combinational; the count is $clog2(N+1) bits wide (the description gives
// log2 w). Written as a simple sum, which synthesis maps to an adder tree.
module ones_count #(
  parameter int unsigned N  = 7,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  in,
  output logic [CW-1:0] count
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++) count = count + CW'(in[i]);
  end

endmodule
