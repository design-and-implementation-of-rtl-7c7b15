// link_code_top_tb -- end-to-end test of the three encoded links at full size
// (8-bit flits, 256-word memory, no parameter overrides).
//
// The counter walks the memory with enb high most of the time and low now and then
// (stalls); it passes the end of the memory several times (wrap). Part of the
// memory is overwritten through the write port with alternating 0x55/0xAA patterns,
// which call for full and even inversions. Each cycle the testbench
//   - predicts the flit from its own copy of the memory (start-up contents recomputed
//     from the address hash) and checks that all three decoders return it one cycle
//     after enb, with out_valid;
//   - checks each link word against the reference encoders and the previous word;
//   - checks that each decoder reports the action its encoder took;
//   - adds up the coupling cost of the body wires on each link and on an unencoded
//     link carrying the same flits.
// It fails if any mechanism (each action of each scheme, a stall, a wrap, a write)
// never happened, or if an encoded link cost more than the unencoded one.
module link_code_top_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  localparam int DW = 8;
  localparam int NP = DW - 1;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, enb = 0;
  logic wr_en = 0;
  logic [7:0] wr_addr = 0;
  logic [DW-1:0] wr_data = 0;
  logic [DW:0]   link_s1, link_s2;
  logic [DW+1:0] link_s3;
  inv_action_t   act_s1, act_s2, act_s3, dec_act_s1, dec_act_s2, dec_act_s3;
  logic          out_valid;
  logic [DW-1:0] out_s1, out_s2, out_s3;
  logic [7:0]    addr;
  logic          addr_wrap;

  link_code_top dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] mem [256];
  int prev [4];              // previous word on links 1..3 and on the raw link
  int cost_raw = 0, cost_s [3] = '{0, 0, 0};
  int seen1 [4], seen2 [4], seen3 [4];
  int n_stall = 0, n_wrap = 0, n_write = 0, n_flits = 0;

  function automatic logic [7:0] hash(int a);
    longint unsigned p;
    p = (longint'(a) * 64'h9E3779B1) & 64'hFFFF_FFFF;
    return 8'(p >> 24) ^ 8'(p >> 8);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h @%0t", what, got, exp, $time);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit pend;                 // a flit was read at the last edge
    int pend_data;
    for (int a = 0; a < 256; a++) mem[a] = hash(a);
    prev = '{0, 0, 0, 0};
    pend = 0; pend_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 1400; k++) begin
      // drive inputs for this cycle, clear of the clock edge
      #1;
      enb   = ($urandom_range(0, 7) != 0);
      wr_en = (k >= 300 && k < 600 && $urandom_range(0, 1) == 1);
      wr_addr = 8'($urandom);
      wr_data = wr_addr[0] ? 8'h55 : 8'hAA;
      if ($urandom_range(0, 3) == 0) wr_data ^= 8'(1 << $urandom_range(0, 7));
      #1;
      // outputs for the flit read at the last edge
      check("out_valid", int'(out_valid), int'(pend));
      if (pend) begin
        int e1, e2, e3;
        e1 = enc1(pend_data, prev[0], DW);
        e2 = enc2(pend_data, prev[1], DW);
        e3 = enc3(pend_data, prev[2], DW);
        check("link_s1", int'(link_s1), e1);
        check("link_s2", int'(link_s2), e2);
        check("link_s3", int'(link_s3), e3);
        check("out_s1", int'(out_s1), pend_data);
        check("out_s2", int'(out_s2), pend_data);
        check("out_s3", int'(out_s3), pend_data);
        check("act1", int'(dec_act_s1), int'(act_s1));
        check("act2", int'(dec_act_s2), int'(act_s2));
        check("act3", int'(dec_act_s3), int'(act_s3));
        seen1[act_s1]++; seen2[act_s2]++; seen3[act_s3]++;
        cost_s[0] += cost(prev[0], int'(link_s1), NP);
        cost_s[1] += cost(prev[1], int'(link_s2), NP);
        cost_s[2] += cost(prev[2], int'(link_s3), NP);
        cost_raw  += cost(prev[3], pend_data, NP);
        prev = '{int'(link_s1), int'(link_s2), int'(link_s3), pend_data};
        n_flits++;
      end
      n_stall += !enb;
      check("addr_wrap", int'(addr_wrap), int'(enb && addr == 8'hFF));
      n_wrap  += addr_wrap;
      // clock edge: model the read (old contents) and then the write
      pend = enb;
      if (enb) pend_data = int'(mem[addr]);
      @(posedge clk);
      if (wr_en) begin mem[wr_addr] = wr_data; n_write++; end
    end
    $display("flits=%0d stalls=%0d wraps=%0d writes=%0d", n_flits, n_stall, n_wrap, n_write);
    $display("scheme I   none=%0d odd=%0d", seen1[0], seen1[2]);
    $display("scheme II  none=%0d odd=%0d full=%0d", seen2[0], seen2[2], seen2[3]);
    $display("scheme III none=%0d odd=%0d even=%0d full=%0d", seen3[0], seen3[2], seen3[1], seen3[3]);
    $display("coupling cost of body wires: raw=%0d s1=%0d s2=%0d s3=%0d",
             cost_raw, cost_s[0], cost_s[1], cost_s[2]);
    need("scheme I odd inversion", seen1[2]);
    need("scheme I no inversion", seen1[0]);
    need("scheme II half inversion", seen2[2]);
    need("scheme II full inversion", seen2[3]);
    need("scheme II no inversion", seen2[0]);
    need("scheme III odd inversion", seen3[2]);
    need("scheme III even inversion", seen3[1]);
    need("scheme III full inversion", seen3[3]);
    need("scheme III no inversion", seen3[0]);
    need("stall (enb low)", n_stall);
    need("address wrap", n_wrap);
    need("memory write", n_write);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (cost_s[s] >= cost_raw) begin failures++; $display("FAIL scheme %0d saves nothing", s + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
