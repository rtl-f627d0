// tb_sp_mode_det: checks scattered pilot mode detection.
//
// Sends symbols with random QPSK (amplitude 362 per component) on data
// carriers, boosted real pilots (+-683) on continual pilot carriers and on the
// scattered pilots of a chosen mode, which runs 2,3,0,1,2,3 like consecutive
// symbols. Expects mode and mode_next for every symbol, one clock after its
// last sample.
module tb_sp_mode_det;
  import dvbt_pkg::*;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_sym_start = 0;
  logic signed [11:0] in_re = 0, in_im = 0;
  logic mode_valid;
  logic [1:0] mode, mode_next;
  sp_mode_det dut (.clk, .rst_n, .in_valid, .in_sym_start, .in_re, .in_im, .mode_valid, .mode, .mode_next);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit is_cp [K_MAX + 1];
  int nvalid = 0;
  always @(posedge clk) if (rst_n && mode_valid) nvalid++;

  initial begin
    for (int i = 0; i < N_CPIL; i++) is_cp[CPIL_POS[i]] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 6; l++) begin
      int m;
      m = (l + 2) % 4;
      for (int p = 0; p < N; p++) begin
        int k;
        k = p - K_OFFSET;
        @(negedge clk);
        in_valid = 1; in_sym_start = (p == 0);
        in_re = 0; in_im = 0;
        if (k >= 0 && k <= K_MAX) begin
          if (is_cp[k] || (k % 12) == 3 * m) begin
            in_re = ($urandom_range(1) == 1) ? 12'sd683 : -12'sd683;
          end else begin
            in_re = ($urandom_range(1) == 1) ? 12'sd362 : -12'sd362;
            in_im = ($urandom_range(1) == 1) ? 12'sd362 : -12'sd362;
          end
        end
      end
      @(negedge clk);
      in_valid = 0;
      check(mode_valid, $sformatf("symbol %0d: mode_valid one clock after the last sample", l));
      check(mode == 2'(m), $sformatf("symbol %0d: mode %0d expected %0d", l, mode, m));
      check(mode_next == 2'(m + 1), $sformatf("symbol %0d: mode_next %0d", l, mode_next));
    end
    repeat (3) @(negedge clk);
    check(nvalid == 6, $sformatf("%0d results", nvalid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
