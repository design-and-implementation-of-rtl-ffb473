// tb_exp_result_bram: reads random and boundary addresses on both ports and
// compares each of the five columns with exp(-dt/tau) (tolerance 1 LSB); the
// word must be available one cycle after the address.
module tb_exp_result_bram;
  import bcpnn_pkg::*;
  logic clk = 0;
  logic [9:0] addr_a, addr_b;
  logic [149:0] dout_a, dout_b;
  int checks = 0, failures = 0;
  exp_result_bram dut (.clk, .addr_a, .dout_a, .addr_b, .dout_b);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check_word(logic [149:0] w, int dt);
    real taus [5];
    taus = '{TAU_ZI, TAU_ZJ, TAU_ZIJ, TAU_E, TAU_P};
    for (int c = 0; c < 5; c++) begin
      real ref_v, got;
      ref_v = $exp(-real'(dt) / taus[c]);
      got = real'(w[(4 - c) * 30 +: 30]) / 268435456.0;
      checks++;
      if (got - ref_v > 1.0 / 268435456.0 || ref_v - got > 1.0 / 268435456.0) begin
        failures++;
        if (failures < 5) $display("dt=%0d col %0d exp %f got %f", dt, c, ref_v, got);
      end
    end
  endtask
  initial begin
    int da, db;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      da = (n == 0) ? 0 : (n == 1) ? 1023 : $urandom_range(0, 1023);
      db = $urandom_range(0, 60);
      addr_a = 10'(da); addr_b = 10'(db);
      @(posedge clk); #1;
      check_word(dout_a, da);
      check_word(dout_b, db);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
