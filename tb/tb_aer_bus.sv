// tb_aer_bus: self-checking test of the AER bus.
// Random spike vectors, from empty to full, are loaded. The test checks that exactly the
// set spikes come out, once each, lowest address first and one per clock with aer_valid,
// that halt is high exactly while spikes are pending, that multi flags vectors with
// several spikes, and that done arrives K+1 clocks after load (2 for an empty vector).
module tb_aer_bus;
  import snn_pkg::*;

  localparam int N = N_PRE;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, load, aer_valid, halt, multi, done;
  logic [N-1:0] spikes;
  naddr_t aer_addr;
  int checks = 0, failures = 0, n_multi = 0;

  aer_bus dut (.clk(clk), .rst(rst), .load(load), .spikes(spikes), .aer_addr(aer_addr),
               .aer_valid(aer_valid), .halt(halt), .multi(multi), .done(done));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; spikes = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      logic [N-1:0] v;
      int k, cyc, expect_next;
      case (t % 4)
        0: v = '0;
        1: v = N'(1) << $urandom_range(0, N - 1);
        2: v = {N{1'b1}};
        default: for (int i = 0; i < N; i++) v[i] = ($urandom_range(0, 2) == 0);
      endcase
      k = $countones(v);
      @(negedge clk);
      spikes = v; load = 1;
      @(negedge clk);
      load = 0; spikes = '0;
      cyc = 1;
      expect_next = 0;
      check(multi == (k > 1), "multi flag");
      if (multi) n_multi++;
      while (!done) begin
        check(halt == aer_valid, "halt while pending");
        if (aer_valid) begin
          while (expect_next < N && !v[expect_next]) expect_next++;
          check(int'(aer_addr) == expect_next, $sformatf("address %0d exp %0d", aer_addr, expect_next));
          expect_next++;
        end
        @(negedge clk);
        cyc++;
        if (cyc > N + 5) break;
      end
      while (expect_next < N && !v[expect_next]) expect_next++;
      check(expect_next == N, "all spikes sent");
      check(cyc == ((k == 0) ? 2 : k + 1), $sformatf("done after %0d clocks, K=%0d", cyc, k));
      check(!halt, "not halted after done");
    end
    check(n_multi > 100, "serialising exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
