// link_code_top -- the three link encoding schemes side by side, each driven from
// the same flit memory through its own encoder, link and decoder.
//
// Data path, per clock with enb high:
//   addr_counter -> flit_sram (one cycle read latency) -> link_encoder (scheme N)
//   -> link_sN wires -> link_decoder (scheme N) -> out_sN
// The memory word of the previous enb cycle is encoded, sent and decoded in one
// cycle, so out_valid is enb delayed by one clock and out_sN equals that word.
// The link words and the encoders' actions are brought out so that the switching
// activity on each link can be observed. The reference top instantiates one scheme
// at a time (counter, SRAM, Encoder, Decoder; enb, clk, rst in, 8-bit out); putting
// the three together and the memory write port are this design's choices.
// Reset rst_n is active low and synchronous. Assertions check, in simulation, that
// every decoder returns the flit that was sent and recognises its encoder's action.
module link_code_top
  import link_code_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  parameter int unsigned AW     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enb,
  // memory load port
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  // links
  output logic [DATA_W:0]   link_s1,
  output logic [DATA_W:0]   link_s2,
  output logic [DATA_W+1:0] link_s3,
  output inv_action_t       act_s1,
  output inv_action_t       act_s2,
  output inv_action_t       act_s3,
  // decoded flits
  output logic              out_valid,
  output logic [DATA_W-1:0] out_s1,
  output logic [DATA_W-1:0] out_s2,
  output logic [DATA_W-1:0] out_s3,
  output inv_action_t       dec_act_s1,
  output inv_action_t       dec_act_s2,
  output inv_action_t       dec_act_s3,
  output logic [AW-1:0]     addr,
  output logic              addr_wrap   // the counter passes the end of the memory
);
  logic [DATA_W-1:0] flit;
  logic              flit_valid;
  logic              lv1, lv2, lv3;
  logic              dv1, dv2, dv3;

  addr_counter #(.AW(AW)) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(enb), .addr(addr), .wrap(addr_wrap));

  flit_sram #(.AW(AW), .DW(DATA_W)) u_mem (
    .clk(clk), .rst_n(rst_n), .rd_addr(addr), .rd_data(flit),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always_ff @(posedge clk) begin
    if (!rst_n) flit_valid <= 1'b0;
    else        flit_valid <= enb;
  end

  link_encoder #(.SCHEME(1), .DATA_W(DATA_W)) u_enc1 (
    .clk(clk), .rst_n(rst_n), .valid(flit_valid), .data(flit),
    .link(link_s1), .link_valid(lv1), .action(act_s1));
  link_encoder #(.SCHEME(2), .DATA_W(DATA_W)) u_enc2 (
    .clk(clk), .rst_n(rst_n), .valid(flit_valid), .data(flit),
    .link(link_s2), .link_valid(lv2), .action(act_s2));
  link_encoder #(.SCHEME(3), .DATA_W(DATA_W)) u_enc3 (
    .clk(clk), .rst_n(rst_n), .valid(flit_valid), .data(flit),
    .link(link_s3), .link_valid(lv3), .action(act_s3));

  link_decoder #(.SCHEME(1), .DATA_W(DATA_W)) u_dec1 (
    .clk(clk), .rst_n(rst_n), .link_valid(lv1), .link(link_s1),
    .data(out_s1), .data_valid(dv1), .action(dec_act_s1));
  link_decoder #(.SCHEME(2), .DATA_W(DATA_W)) u_dec2 (
    .clk(clk), .rst_n(rst_n), .link_valid(lv2), .link(link_s2),
    .data(out_s2), .data_valid(dv2), .action(dec_act_s2));
  link_decoder #(.SCHEME(3), .DATA_W(DATA_W)) u_dec3 (
    .clk(clk), .rst_n(rst_n), .link_valid(lv3), .link(link_s3),
    .data(out_s3), .data_valid(dv3), .action(dec_act_s3));

  assign out_valid = dv1 & dv2 & dv3;

  a_decoded: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid |-> (out_s1 == flit) && (out_s2 == flit) && (out_s3 == flit))
    else $error("decoded flit differs from the flit sent");
  a_action: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid |-> (dec_act_s1 == act_s1) && (dec_act_s2 == act_s2) && (dec_act_s3 == act_s3))
    else $error("decoder did not recognise the encoder's action");

endmodule
