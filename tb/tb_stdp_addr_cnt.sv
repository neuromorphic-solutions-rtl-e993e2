// tb_stdp_addr_cnt: self-checking test of the STDP address counter.
// Starts several scans and checks the address sequence 0..N_SYN-1, the active flag, the
// done pulse one clock after the last address, and that a start during a scan is ignored.
module tb_stdp_addr_cnt;
  import snn_pkg::*;

  localparam int N = N_IN;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, en_addr, active, done;
  naddr_t syn_addr;
  int checks = 0, failures = 0;

  stdp_addr_cnt dut (.clk(clk), .rst(rst), .en_addr(en_addr), .syn_addr(syn_addr),
                     .active(active), .done(done));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en_addr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!active && !done, "idle after reset");
    for (int s = 0; s < 4; s++) begin
      en_addr = 1;
      @(negedge clk);
      en_addr = 0;
      for (int i = 0; i < N; i++) begin
        check(active && int'(syn_addr) == i, $sformatf("scan %0d addr %0d got %0d", s, i, syn_addr));
        check(!done, "no early done");
        if (i == 5) en_addr = 1;   // ignored during a scan
        @(negedge clk);
        en_addr = 0;
      end
      check(!active && done, "done after last address");
      @(negedge clk);
      check(!active && !done, "done is one cycle");
      repeat (s) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
