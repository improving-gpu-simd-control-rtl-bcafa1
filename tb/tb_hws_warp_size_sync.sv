// tb_hws_warp_size_sync: self-checking test of the cross-SM warp-size maximum.
// Includes the case of 27 SMs with one-quarter warps and one SM with a full
// warp, which must force four quarters for all.
module tb_hws_warp_size_sync;
  import hws_pkg::*;

  localparam int N = 28;
  qcount_t [N-1:0] sm_quarters;
  qcount_t         max_quarters;
  int checks = 0, failures = 0;

  hws_warp_size_sync #(.NUM_SM(N)) dut (.sm_quarters, .max_quarters);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) sm_quarters[i] = 3'd1;
    sm_quarters[17] = 3'd4;
    #1;
    check(max_quarters == 3'd4, "one full warp forces size 32");
    for (int n = 0; n < 1000; n++) begin
      int m;
      m = 0;
      for (int i = 0; i < N; i++) begin
        sm_quarters[i] = 3'($urandom_range(0, (n % 4) + 1));
        if (int'(sm_quarters[i]) > m) m = int'(sm_quarters[i]);
      end
      #1;
      check(int'(max_quarters) == m, "maximum over SMs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
