// link_encoder -- network-interface encoder: block E of the chosen scheme plus the
// register holding the previously encoded link word.
//
// SCHEME selects the block E: 1 = odd inversion, 2 = odd or full inversion,
// 3 = odd, even or full inversion. On a cycle with valid high the body `data` is
// encoded against the previous link word and appears on `link` in the same cycle
// (combinational path, as drawn in the description); at the clock edge the register
// takes the new link word. With valid low the register holds. Reset (active low,
// synchronous) clears the register, i.e. the link is taken to start all-zero; the
// reset polarity is read from the reference top, where rst is high while running.
// The link is DATA_W+1 wires for schemes I and II and DATA_W+2 for scheme III.
module link_encoder
  import link_code_pkg::*;
#(
  parameter int unsigned SCHEME = 3,
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + ((SCHEME == 3) ? 2 : 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [DATA_W-1:0] data,
  output logic [LW-1:0]     link,
  output logic              link_valid,
  output inv_action_t       action
);

  logic [LW-1:0] prev_q;

  if (SCHEME == 1) begin : g_s1
    enc_s1 #(.DATA_W(DATA_W)) u_e (.x(data), .y(prev_q), .z(link), .action(action));
  end else if (SCHEME == 2) begin : g_s2
    enc_s2 #(.DATA_W(DATA_W)) u_e (.x(data), .y(prev_q), .z(link), .action(action));
  end else begin : g_s3
    enc_s3 #(.DATA_W(DATA_W)) u_e (.x(data), .y(prev_q), .z(link), .action(action));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     prev_q <= '0;
    else if (valid) prev_q <= link;
  end

  assign link_valid = valid;

  initial begin
    assert (SCHEME >= 1 && SCHEME <= 3) else $error("SCHEME must be 1, 2 or 3");
    assert (DATA_W >= 2) else $error("DATA_W must be at least 2");
  end

endmodule
