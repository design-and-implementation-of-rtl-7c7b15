// link_decoder -- network-interface decoder: block D of the chosen scheme plus the
// register holding the previously received link word.
//
// On a cycle with link_valid high the received word is decoded in the same cycle
// (combinational) and the register then takes it, so that the scheme II decoder
// can compare the next word with it. Schemes I and III decode from the inversion
// wires alone and leave the register unused. Reset (active low, synchronous)
// clears the register to the all-zero link the encoder also starts from.
module link_decoder
  import link_code_pkg::*;
#(
  parameter int unsigned SCHEME = 3,
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + ((SCHEME == 3) ? 2 : 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_valid,
  input  logic [LW-1:0]     link,
  output logic [DATA_W-1:0] data,
  output logic              data_valid,
  output inv_action_t       action
);

  logic [LW-1:0] prev_q;

  if (SCHEME == 1) begin : g_s1
    dec_s1 #(.DATA_W(DATA_W)) u_d (.z(link), .x(data), .action(action));
  end else if (SCHEME == 2) begin : g_s2
    dec_s2 #(.DATA_W(DATA_W)) u_d (.z(link), .r(prev_q), .x(data), .action(action));
  end else begin : g_s3
    dec_s3 #(.DATA_W(DATA_W)) u_d (.z(link), .x(data), .action(action));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          prev_q <= '0;
    else if (link_valid) prev_q <= link;
  end

  assign data_valid = link_valid;

endmodule
