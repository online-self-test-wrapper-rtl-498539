// tb_container_interface: checks the container model for every loadable
// module.  Functional modules against exact results (bitwise inverse, 32-bit
// sum with carry); test configurations against reference behaviour computed
// here from the input history (delay of the XOR/XNOR chains, shift chains,
// RAM reads, latch chains, carry chains), that all four array copies agree,
// and that the fault input makes copy 0 disagree.
module tb_container_interface;
  import selftest_pkg::*;
  localparam int LEN = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clk_0 = 1'b0, clk_1 = 1'b0, rst = 1'b1, fault = 1'b0;
  logic [31:0] ain = '0, bin = '0, rl, rm;
  rm_e         cfg = RM_INVERTER;

  container_interface #(.LEN(LEN), .COPIES(4)) dut (
    .clk, .clk_0, .clk_1, .rst, .ain, .bin, .result_lsb(rl), .result_msb(rm), .cfg, .fault);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cfg=%0d at %0t", what, cfg, $time); end
  endtask

  function automatic bit copies_agree(input logic [31:0] r, input bit two);
    return (r[3:0] == 4'h0 || r[3:0] == 4'hF) && (!two || r[7:4] == 4'h0 || r[7:4] == 4'hF);
  endfunction

  task automatic do_reset();
    rst = 1'b1; ain = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
  endtask

  initial begin
    #2000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] hist [$];

  initial begin
    // ---------------- functional modules
    do_reset();
    cfg = RM_INVERTER;
    repeat (50) begin
      ain = $urandom; bin = $urandom; #1;
      check(rl == ~ain && rm == ~bin, "inverter");
    end
    cfg = RM_ADDER;
    ain = 32'h123; bin = 32'h456; #1;
    check(rl == 32'h579 && rm == 0, "adder example");
    ain = 32'hFFFF_FFFF; bin = 32'h1; #1;
    check(rl == 0 && rm == 1, "adder carry out");
    repeat (50) begin
      logic [32:0] s;
      ain = $urandom; bin = $urandom; #1;
      s = {1'b0, ain} + {1'b0, bin};
      check(rl == s[31:0] && rm == {31'b0, s[32]}, "adder");
    end

    // ---------------- xor / xnor chains
    for (int m = 0; m < 2; m++) begin
      cfg = (m == 0) ? RM_XOR : RM_XNOR;
      do_reset();
      hist.delete();
      for (int t = 0; t < 100; t++) begin
        ain = 32'($urandom) & 32'h7F;
        hist.push_back(ain);
        @(posedge clk); #1;
        if (t >= LEN) begin
          bit r;
          int n;
          n = hist.size();
          if (m == 0) begin
            r = ^hist[n-LEN][4:0];
            for (int j = n - LEN + 1; j < n; j++) r ^= ^hist[j][4:1];
            check(rl[3:0] == {4{r}}, "xor chain");
            check(rl[7:4] == {4{^hist[n-1][4:0]}}, "xor extra flip-flops");
          end else begin
            r = ~^hist[n-LEN][5:0];
            for (int j = n - LEN + 1; j < n; j++) r = ~(r ^ (^hist[j][5:1]));
            check(rl[3:0] == {4{r}}, "xnor chain");
            check(rl[7:4] == {4{hist[n-1][6]}}, "xnor bypass flip-flops");
          end
        end
        check(copies_agree(rl, 1), "copies agree");
      end
      fault = 1'b1; #1;
      check(rl[0] != rl[1] && rl[4] != rl[5], "fault shows in copy 0");
      fault = 1'b0;
    end

    // ---------------- carry chain, carry-out variant
    cfg = RM_CARRY_COUT_FF;
    do_reset();
    for (int t = 0; t < 40; t++) begin
      logic [31:0] a;
      a = 32'($urandom) & 32'h48;
      ain = a;
      @(posedge clk); #1;
      check(rl[3:0] == {4{a[3]}} && rl[7:4] == {4{a[6]}}, "carry-out chain");
    end

    // ---------------- shift chains
    cfg = RM_SR;
    do_reset();
    begin
      bit q [$];
      for (int i = 0; i < 2 * LEN; i++) q.push_back(1'b0);
      for (int t = 0; t < 200; t++) begin
        bit e, d;
        e = $urandom_range(1); d = $urandom_range(1);
        ain = {24'b0, e, d, 6'b0};
        @(posedge clk); #1;
        if (e) begin q.push_back(d); void'(q.pop_front()); end
        check(rl[3:0] == {4{q[0]}}, "shift chain output");
      end
    end

    // ---------------- RAM
    cfg = RM_RAM;
    do_reset();
    begin
      bit [63:0] mem;
      mem = '0;
      for (int t = 0; t < 400; t++) begin
        bit e, d;
        bit [5:0] a;
        bit exp_r;
        e = $urandom_range(1); d = $urandom_range(1); a = 6'($urandom);
        ain = {24'b0, e, d, a};
        exp_r = mem[a];
        @(posedge clk); #1;
        if (e) mem[a] = d;
        check(rl[3:0] == {4{exp_r}}, "RAM read");
      end
    end

    // ---------------- latch chains
    for (int m = 0; m < 2; m++) begin
      cfg = (m == 0) ? RM_LATCH_CY : RM_LATCH_O5;
      do_reset();
      for (int v = 0; v < 4; v++) begin
        ain = {25'b0, v[0], 6'b0};
        repeat (LEN) begin
          #1 clk_0 = 1'b1; #2 clk_0 = 1'b0;
          #1 clk_1 = 1'b1; #2 clk_1 = 1'b0;
        end
        #1;
        check(rl[3:0] == {4{v[0] ^ ((m == 1) && ((LEN - 1) % 2 == 1))}}, "latch chain steady state");
        check(copies_agree(rl, 0), "latch copies agree");
      end
      // One window pair moves data by exactly two stages: not yet at the end.
      ain = {25'b0, 1'b0, 6'b0};
      #1 clk_0 = 1'b1; #2 clk_0 = 1'b0; #1 clk_1 = 1'b1; #2 clk_1 = 1'b0; #1;
      check(rl[3:0] == {4{1'b1 ^ ((m == 1) && ((LEN - 1) % 2 == 1))}}, "latches hold when closed");
    end

    // ---------------- carry chains with sum outputs
    for (int m = 0; m < 2; m++) begin
      cfg = (m == 0) ? RM_CARRYSUM_FF : RM_CARRYSUM_MUX;
      do_reset();
      for (int v = 0; v < 8; v++) begin
        bit x, a, es, ec;
        x = v[0]; a = v[1];
        ain = {30'b0, a, x};
        es = x ? 1'b1 : a;
        ec = x ? 1'b0 : a;
        if (m == 0) begin @(posedge clk); #1; end else #1;
        check(rl[3:0] == {4{es}} && rl[7:4] == {4{ec}}, "carry-sum chain");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
