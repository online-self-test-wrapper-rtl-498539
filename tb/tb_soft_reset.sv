// tb_soft_reset: writing the key gives a reset pulse of exactly RESET_WIDTH
// clocks; other values give none; every write is acknowledged at once.
module tb_soft_reset;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst = 1'b1, wr_stb = 1'b0, wr_ack, reset_out;
  logic [31:0] wr_data = '0;

  soft_reset #(.RESET_WIDTH(16)) dut (.clk, .rst, .wr_stb, .wr_data, .wr_ack, .reset_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write(input logic [31:0] d);
    @(negedge clk) wr_stb = 1'b1; wr_data = d;
    #1 check(wr_ack == 1'b1, "ack with strobe");
    @(negedge clk) wr_stb = 1'b0;
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int width;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(reset_out == 1'b0, "idle after reset");
    write(32'h0000_0005);
    repeat (20) begin @(negedge clk); check(reset_out == 1'b0, "other value ignored"); end
    write(32'h0000_000A);
    width = 1;   // the clock that took the write already counts
    while (reset_out && width < 100) begin @(negedge clk); if (reset_out) width++; end
    check(width == 16, "pulse width");
    check(wr_ack == 1'b0, "no ack without strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
