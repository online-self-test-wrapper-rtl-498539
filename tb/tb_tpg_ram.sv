// tb_tpg_ram: checks the MATS++ TPG against a sequence built here from the
// march notation {up(w0); up(r0,w1); down(r1,w0,r0)}, operation by operation
// (address, write enable, data, read flag, expected value), checks that a
// fault-free reference RAM driven by the TPG always returns the expected
// value, and that done rises after exactly 384 + FLUSH clocks.
module tb_tpg_ram;
  import selftest_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     run = 1'b0;
  tpg_vec_t v;
  logic     exp_v, rd, done;

  tpg_ram #(.AW(6), .FLUSH(8)) dut (.clk, .run, .vec(v), .expect_o(exp_v), .rd, .done);

  typedef struct { bit we; bit d; bit rd; bit e; int a; } op_t;
  op_t ops [$];
  logic [63:0] ref_mem;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) ops.push_back('{1, 0, 0, 0, a});
    for (int a = 0; a < 64; a++) begin
      ops.push_back('{0, 0, 1, 0, a});
      ops.push_back('{1, 1, 0, 0, a});
    end
    for (int a = 63; a >= 0; a--) begin
      ops.push_back('{0, 0, 1, 1, a});
      ops.push_back('{1, 0, 0, 0, a});
      ops.push_back('{0, 0, 1, 0, a});
    end
    ref_mem = {64{1'b1}};   // arbitrary start: the march must not depend on it
    repeat (2) @(posedge clk);
    @(negedge clk) run = 1'b1; #1;
    for (int c = 0; c < 384 + 8 + 3; c++) begin
      if (c < 384) begin
        check(v.tpg == 6'(ops[c].a), "address");
        check(v.en == ops[c].we, "write enable");
        if (ops[c].we) check(v.in_tpg == ops[c].d, "write data");
        check(rd == ops[c].rd, "read flag");
        if (ops[c].rd) begin
          check(exp_v == ops[c].e, "expected value");
          check(ref_mem[v.tpg] == exp_v, "reference RAM read matches");
        end
      end else begin
        check(v.en == 1'b0, "no write while flushing");
      end
      check(done == (c >= 384 + 8), "done timing");
      @(posedge clk);
      if (v.en) ref_mem[v.tpg] = v.in_tpg;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
