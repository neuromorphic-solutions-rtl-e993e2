// tb_izh_neuron: self-checking test of one output neuron (RAM + input align + v/u core).
// Loads random weights into the synapse RAM, then runs many single steps from rest: a random
// set of presynaptic addresses is sent over the AER inputs, EN is pulsed, and the membrane
// potential and spike are compared with a hand evaluation of one Euler step of the
// Izhikevich equations from rest, with the current limited at -140.
module tb_izh_neuron;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, en, we, aer_valid, spike_out, clamped;
  naddr_t addr, aer_bus;
  weight_t weight;
  fix_t v_out, u_out;
  int checks = 0, failures = 0, n_spk = 0, n_clamp = 0, n_quiet = 0;

  izh_neuron dut (.clk(clk), .rst(rst), .en(en), .we(we), .addr(addr), .weight(weight),
                  .aer_bus(aer_bus), .aer_valid(aer_valid), .spike_out(spike_out),
                  .v_out(v_out), .u_out(u_out), .clamped(clamped));

  int w_ref [N_PRE];

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
    rst = 1; en = 0; we = 0; aer_valid = 0; addr = '0; aer_bus = '0; weight = '0;
    repeat (2) @(negedge clk);
    for (int trial = 0; trial < 200; trial++) begin
      int s, cur;
      real v1;
      bit exp_spk;
      // new random weights every 20 trials; the RAM is not touched by reset
      if (trial % 20 == 0) begin
        for (int i = 0; i < N_PRE; i++) begin
          @(negedge clk);
          we = 1; addr = naddr_t'(i);
          w_ref[i] = (trial % 40 == 0) ? $urandom_range(0, 120) - 100 : $urandom_range(0, 120) - 40;
          weight = weight_t'(w_ref[i]);
        end
        @(negedge clk); we = 0;
      end
      // neuron back to rest
      rst = 1; @(negedge clk); rst = 0;
      s = 0;
      for (int i = 0; i < N_PRE; i++) begin
        if ($urandom_range(0, 2) == 0) begin
          aer_bus = naddr_t'(i); aer_valid = 1;
          s += w_ref[i];
          @(negedge clk);
        end
      end
      aer_valid = 0;
      aer_bus = naddr_t'($urandom_range(0, N_PRE - 1));   // ignored without aer_valid
      @(negedge clk);
      check(clamped == (s < -140), "clamped flag");
      en = 1; @(negedge clk); en = 0;
      cur = (s < -140) ? -140 : s;
      v1  = -65.0 + (0.04 * 4225.0 - 325.0 + 140.0 + 13.0 + real'(cur)) / 4.0;
      if (v1 < -140.0) v1 = -140.0;
      exp_spk = (v1 >= 30.0);
      if (v1 > 29.9 && v1 < 30.1) continue;          // too close to the threshold to judge
      check(spike_out == exp_spk, $sformatf("trial %0d sum %0d spike %0d exp %0d", trial, s, spike_out, exp_spk));
      if (exp_spk) begin
        check(v_out == to_fix(-65), "reset after spike");
        n_spk++;
      end else begin
        int vi;
        real vd;
        vi = v_out;
        vd = real'(vi) / 65536.0;
        check(vd - v1 < 0.05 && v1 - vd < 0.05, $sformatf("trial %0d v=%f exp %f", trial, vd, v1));
        n_quiet++;
      end
      if (s < -140) n_clamp++;
    end
    check(n_spk > 5 && n_quiet > 5 && n_clamp > 3, $sformatf("coverage spk %0d quiet %0d clamp %0d", n_spk, n_quiet, n_clamp));
    $display("spikes %0d, quiet %0d, clamped %0d", n_spk, n_quiet, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
