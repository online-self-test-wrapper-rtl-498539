// tpg_ram: test pattern generator for ram_test (LUTs used as 64x1 RAMs).
//
// Applies the MATS++ march test, one operation per clock:
//   up   (w0)          for every address 0..63 write 0
//   up   (r0, w1)      read (expect 0), then write 1
//   down (r1, w0, r0)  from address 63 to 0: read (expect 1), write 0,
//                      read (expect 0)
// 64 + 128 + 192 = 384 operations.  The 6-bit address goes to in_tpg0..5
// (ain(5:0)), the write data to in_tpg (ain(6)) and the write enable to en
// (ain(7)).  The algorithm and the 6-bit address counter follow the test
// description; the bit assignment and the flush time are this design's
// choices.  The RAM copies are checked against each other by the ORA, so the
// value a read expects is only brought out on expect/rd.
//
// Interface: run = 0 clears the generator.  done rises after exactly
// 384 + FLUSH rising edges with run high and holds until run falls.
module tpg_ram
  import selftest_pkg::*;
#(
  parameter int unsigned AW    = 6,
  parameter int unsigned FLUSH = 8
) (
  input  logic     clk,
  input  logic     run,
  output tpg_vec_t vec,
  output logic     expect_o,
  output logic     rd,
  output logic     done
);

  typedef enum logic [1:0] {M0_W0, M1_R0W1, M2_R1W0R0, M_FLUSH} elem_e;

  localparam int unsigned FW = $clog2(FLUSH + 1);

  elem_e         elem;
  logic [1:0]    op;
  logic [AW-1:0] addr;
  logic [FW-1:0] fl;

  always_ff @(posedge clk) begin
    if (!run) begin
      elem <= M0_W0;
      op   <= '0;
      addr <= '0;
      fl   <= '0;
      done <= 1'b0;
    end else begin
      unique case (elem)
        M0_W0: begin
          addr <= addr + 1'b1;
          if (&addr) elem <= M1_R0W1;
        end
        M1_R0W1: begin
          if (op == 2'd1) begin
            op <= '0;
            if (&addr) elem <= M2_R1W0R0;   // addr wraps to 0 -> keep at all-ones
            else       addr <= addr + 1'b1;
          end else begin
            op <= op + 1'b1;
          end
        end
        M2_R1W0R0: begin
          if (op == 2'd2) begin
            op <= '0;
            if (addr == '0) elem <= M_FLUSH;
            else            addr <= addr - 1'b1;
          end else begin
            op <= op + 1'b1;
          end
        end
        M_FLUSH: begin
          if (!done) begin
            fl <= fl + 1'b1;
            if (fl == FW'(FLUSH - 1)) done <= 1'b1;
          end
        end
      endcase
    end
  end

  // Operation decode.
  logic we, din;
  always_comb begin
    we       = 1'b0;
    din      = 1'b0;
    rd       = 1'b0;
    expect_o = 1'b0;
    unique case (elem)
      M0_W0:     begin we = 1'b1; din = 1'b0; end
      M1_R0W1:   if (op == 2'd0) begin rd = 1'b1; expect_o = 1'b0; end
                 else            begin we = 1'b1; din = 1'b1; end
      M2_R1W0R0: if (op == 2'd0)      begin rd = 1'b1; expect_o = 1'b1; end
                 else if (op == 2'd1) begin we = 1'b1; din = 1'b0; end
                 else                 begin rd = 1'b1; expect_o = 1'b0; end
      default: ;
    endcase
    we         = we & run;
    vec        = '0;
    vec.en     = we;
    vec.in_tpg = din;
    vec.tpg    = 6'(addr);
  end

endmodule
