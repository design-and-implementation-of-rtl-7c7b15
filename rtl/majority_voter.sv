// majority_voter -- 1 when more than half of its N inputs are 1.
//
// Combinational. Used in the scheme I encoder (decide on odd inversion) and in the
// scheme II decoder (tell a half inversion from a full one). With N odd there is no
// tie; with N even, exactly N/2 ones gives 0 (this design's choice).
module majority_voter #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0] in,
  output logic         major
);

  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] count;

  ones_count #(.N(N)) u_count (.in(in), .count(count));

  assign major = ({1'b0, count} << 1) > (CW + 1)'(N);

endmodule
