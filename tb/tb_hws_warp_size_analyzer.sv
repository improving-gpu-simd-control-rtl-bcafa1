// tb_hws_warp_size_analyzer: self-checking test of warp scaling.
// Checks the quarter mask, the issue length and the scaled warp size for the
// 16-thread example mask 0011 and for random active masks, against values
// computed here by counting threads per quarter.
module tb_hws_warp_size_analyzer;
  import hws_pkg::*;

  logic [WARP_SIZE-1:0] act;
  qmask_t               qmask;
  qcount_t              quarters;
  logic [5:0]           warp_size;
  int checks = 0, failures = 0;

  hws_warp_size_analyzer dut (.act, .qmask, .quarters, .warp_size);

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
    // example: threads only in quarters 0 and 1 -> mask 0011, size 16
    act = 32'h0000_F7BF;
    #1;
    check(qmask == 4'b0011 && quarters == 3'd2 && warp_size == 6'd16, "mask 0011 gives size 16");
    act = '0;
    #1;
    check(qmask == 4'b0000 && quarters == 3'd0 && warp_size == 6'd0, "empty warp");
    for (int n = 0; n < 2000; n++) begin
      int nq;
      logic [3:0] em;
      for (int q = 0; q < 4; q++) begin
        act[q*8 +: 8] = ($urandom_range(0, 2) == 0) ? 8'h00 : 8'($urandom);
      end
      #1;
      nq = 0;
      for (int q = 0; q < 4; q++) begin
        em[q] = 1'b0;
        for (int l = 0; l < 8; l++) if (act[q*8+l]) em[q] = 1'b1;
        if (em[q]) nq++;
      end
      check(qmask == em, "quarter mask");
      check(int'(quarters) == nq, "issue cycles");
      check(int'(warp_size) == 8 * nq, "scaled warp size");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
