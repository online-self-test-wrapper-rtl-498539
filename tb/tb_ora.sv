// tb_ora: drives the ORA with random responses (mostly equal copies, some
// with one or two copies wrong) and compares the flag with a reference that
// XOR-reduces each group and keeps the result until clear.
module tb_ora;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clear, en;
  logic [7:0] resp;
  logic       err1, err2;

  ora #(.N_IN(4), .N_GRP(1)) dut1 (.clk, .clear, .en, .resp(resp[3:0]), .err(err1));
  ora #(.N_IN(4), .N_GRP(2)) dut2 (.clk, .clear, .en, .resp(resp),      .err(err2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ref1, ref2, m1, m2;
    int n_detect;
    n_detect = 0;
    clear = 1'b1; en = 1'b0; resp = '0;
    @(posedge clk); #1;
    ref1 = 0; ref2 = 0;
    for (int i = 0; i < 2000; i++) begin
      bit b0, b1;
      int r;
      b0 = $urandom_range(1); b1 = $urandom_range(1);
      resp = {{4{b1}}, {4{b0}}};
      r = $urandom_range(99);
      if (r < 4)       resp[$urandom_range(7)] ^= 1'b1;            // one copy wrong
      else if (r < 6)  resp[1:0] ^= 2'b11;                          // two copies wrong: cancels
      clear = ($urandom_range(49) == 0);
      en    = ($urandom_range(9) != 0);
      m1 = (resp[0] != resp[1]) ^ (resp[2] != resp[3]);
      m2 = m1 | ((resp[4] != resp[5]) ^ (resp[6] != resp[7]));
      @(posedge clk); #1;
      ref1 = clear ? 1'b0 : (ref1 | (en & m1));
      ref2 = clear ? 1'b0 : (ref2 | (en & m2));
      if (ref1 && !clear && en && m1) n_detect++;
      check(err1 == ref1, "one-group flag");
      check(err2 == ref2, "two-group flag");
    end
    check(n_detect > 0, "mismatches were seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
