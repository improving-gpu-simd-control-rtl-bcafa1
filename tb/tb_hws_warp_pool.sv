// tb_hws_warp_pool: self-checking test of the warp pool.
// Random writes, clears and PC lookups against a shadow model of the entries;
// checks stored data, valid bits, the lowest free entry, the full flag, the
// entry count and the PC match vector, and fills the pool completely once.
module tb_hws_warp_pool;
  import hws_pkg::*;

  localparam int D  = 8;
  localparam int IW = $clog2(D);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, clr_en = 0;
  logic [IW-1:0] wr_idx = '0, clr_idx = '0;
  pool_entry_t wr_data = '0;
  pc_t match_pc = '0;
  logic [D-1:0] valid, pc_match;
  pool_entry_t [D-1:0] entries;
  logic [IW-1:0] free_idx;
  logic full;
  logic [IW:0] count;
  int checks = 0, failures = 0;

  hws_warp_pool #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit          mv[D];
  pool_entry_t me[D];
  bit          was_full = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < D; i++) mv[i] = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // compare combinational outputs with the model
      begin
        int nf, cnt;
        nf = -1; cnt = 0;
        for (int i = D - 1; i >= 0; i--) if (!mv[i]) nf = i;
        for (int i = 0; i < D; i++) if (mv[i]) cnt++;
        for (int i = 0; i < D; i++) begin
          check(valid[i] == mv[i], "valid bit");
          if (mv[i]) check(entries[i] == me[i], "entry contents");
          check(pc_match[i] == (mv[i] && me[i].pc == match_pc), "pc match");
        end
        check(full == (nf < 0), "full flag");
        if (nf >= 0) check(int'(free_idx) == nf, "lowest free entry");
        check(int'(count) == cnt, "entry count");
        if (nf < 0) was_full = 1;
      end
      // next operation; fill faster in the first half
      wr_en   = $urandom_range(0, 3) != 0;
      wr_idx  = IW'($urandom_range(0, D - 1));
      wr_data = {pc_t'($urandom_range(0, 3)), {12{$urandom}}, 4'($urandom)};
      clr_en  = 0;
      if ($urandom_range(0, (n < 2000) ? 5 : 1) == 0) begin
        int c;
        c = $urandom_range(0, D - 1);
        if (mv[c]) begin clr_en = 1; clr_idx = IW'(c); end
      end
      if (wr_en && clr_en && wr_idx == clr_idx) wr_en = 0;
      match_pc = pc_t'($urandom_range(0, 3));
      @(posedge clk);
      if (wr_en) begin mv[wr_idx] = 1; me[wr_idx] = wr_data; end
      if (clr_en) mv[clr_idx] = 0;
    end
    check(was_full, "pool was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
