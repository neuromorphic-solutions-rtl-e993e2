// tb_izh_core: self-checking test of the Izhikevich v/u equations.
// The fixed-point core is run side by side with a floating-point model of the same
// regular-spiking equations and step size (0.25 ms). It checks v after every step within a
// tolerance in the slow part of the first interspike interval, the spike count over a long constant-
// current run, silence at rest, the exact reset values after a spike, and that the state
// holds while EN is low. A second, bit-exact model works in 64-bit integers from the number
// format alone (Q16.16, products truncated towards minus infinity and wrapped to 32 bits,
// 0.04 = 2621/65536, a = 1311/65536, b = 13107/65536). It follows the core through a long run
// of random currents, including stretches at the -140 input limit, and v, u and the spike
// must match exactly after every step.
module tb_izh_core;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, en, spike_out;
  current_t i_in;
  fix_t v_out, u_out;
  int checks = 0, failures = 0;

  izh_core dut (.clk(clk), .rst(rst), .en(en), .i_in(i_in), .spike_out(spike_out),
                .v_out(v_out), .u_out(u_out));

  real mv, mu;
  bit  mspike;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real to_real(input fix_t x);
    return real'(x) / 65536.0;
  endfunction

  task automatic model_step(input int cur);
    real dv, du, vn, un;
    dv = 0.04 * mv * mv + 5.0 * mv + 140.0 - mu + real'(cur);
    du = 0.02 * (0.2 * mv - mu);
    vn = mv + dv / 4.0;
    un = mu + du / 4.0;
    mspike = (vn >= 30.0);
    if (mspike) begin
      mv = -65.0; mu = un + 8.0;
    end else begin
      mv = (vn < -140.0) ? -140.0 : vn;
      mu = un;
    end
  endtask

  // bit-exact reference state
  longint xv, xu;
  bit     xspike;

  function automatic longint w32(input longint x);
    return longint'(int'(x));              // keep the low 32 bits, signed
  endfunction

  function automatic longint qm(input longint x, input longint y);
    return w32((x * y) >>> 16);
  endfunction

  task automatic exact_reset();
    xv = -65 * 65536;
    xu = qm(13107, xv);
  endtask

  task automatic exact_step(input int cur);
    longint dv, du, vn, un;
    dv = w32(qm(qm(xv, xv), 2621) + 5 * xv + 140 * 65536 - xu + longint'(cur) * 65536);
    du = qm(1311, w32(qm(13107, xv) - xu));
    vn = w32(xv + (dv >>> 2));
    un = w32(xu + (du >>> 2));
    xspike = (vn >= 30 * 65536);
    if (xspike) begin
      xv = -65 * 65536; xu = w32(un + 8 * 65536);
    end else begin
      xv = (vn < -140 * 65536) ? -140 * 65536 : vn;
      xu = un;
    end
  endtask

  task automatic dut_step(input int cur);
    @(negedge clk);
    i_in = current_t'(cur); en = 1;
    @(negedge clk);
    en = 0;
  endtask

  task automatic do_reset();
    rst = 1; en = 0; i_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    mv = -65.0; mu = 0.2 * -65.0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_dut, n_mod, first_dut, first_mod;
    fix_t v_hold, u_hold, u_before;

    // 1. rest: no input, no spikes, v stays near -65 .. -70
    do_reset();
    check(v_out == to_fix(-65), "reset v = c");
    n_dut = 0;
    for (int s = 0; s < 300; s++) begin
      dut_step(0);
      model_step(0);
      n_dut += spike_out;
    end
    check(n_dut == 0, "no spikes at rest");
    check(to_real(v_out) < -60.0 && to_real(v_out) > -75.0, $sformatf("rest potential %f", to_real(v_out)));
    check((to_real(v_out) - mv) < 0.5 && (mv - to_real(v_out)) < 0.5, "rest matches model");

    // 2. constant current: tonic regular spiking, compare with the model
    do_reset();
    n_dut = 0; n_mod = 0; first_dut = -1; first_mod = -1;
    for (int s = 0; s < 600; s++) begin
      dut_step(10);
      model_step(10);
      if (spike_out && first_dut < 0) first_dut = s;
      if (mspike && first_mod < 0) first_mod = s;
      n_dut += spike_out; n_mod += mspike;
      if (first_mod < 0 && first_dut < 0 && mv < -40.0)   // before the fast upswing
        check((to_real(v_out) - mv) < 0.5 && (mv - to_real(v_out)) < 0.5,
              $sformatf("step %0d v=%f model %f", s, to_real(v_out), mv));
    end
    $display("constant current: dut %0d spikes (first %0d), model %0d (first %0d)",
             n_dut, first_dut, n_mod, first_mod);
    check(n_dut >= 3, "regular spiking under constant current");
    check(first_dut - first_mod <= 1 && first_mod - first_dut <= 1, "first spike time");
    check(n_dut - n_mod <= 1 && n_mod - n_dut <= 1, "spike count");

    // 3. single strong kick from rest fires in that step; exact reset values
    do_reset();
    repeat (20) dut_step(0);
    u_before = u_out;
    dut_step(500);
    check(spike_out == 1'b1, "kick of 500 fires");
    check(v_out == to_fix(-65), "v reset to c");
    check(to_real(u_out) - to_real(u_before) > 7.9 && to_real(u_out) - to_real(u_before) < 8.1,
          "u incremented by d");
    dut_step(0);
    check(spike_out == 1'b0, "spike_out lasts one step");

    // 4. EN low freezes the state
    dut_step(40);
    v_hold = v_out; u_hold = u_out;
    i_in = current_t'(500);
    repeat (10) @(negedge clk);
    check(v_out == v_hold && u_out == u_hold, "state frozen without EN");

    // 5. bit-exact comparison over random currents
    begin
      int cur, n_spk, n_floor, errs;
      do_reset();
      exact_reset();
      check(longint'(v_out) == xv && longint'(u_out) == xu, "exact reset state");
      n_spk = 0; n_floor = 0; errs = 0;
      for (int s = 0; s < 4000; s++) begin
        unique case ((s / 200) % 4)
          0: cur = int'($urandom_range(0, 30));              // near threshold
          1: cur = int'($urandom_range(0, 300)) - 100;       // mixed, strong kicks
          2: cur = -140;                                      // held at the input limit
          default: cur = int'($urandom_range(0, 60)) - 20;
        endcase
        dut_step(cur);
        exact_step(cur);
        n_spk   += xspike;
        n_floor += (cur == -140);
        checks++;
        if (longint'(v_out) != xv || longint'(u_out) != xu || spike_out != xspike) begin
          failures++;
          if (errs++ < 5)
            $display("FAIL: exact step %0d I=%0d v=%0d/%0d u=%0d/%0d spike=%0b/%0b", s, cur,
                     v_out, xv, u_out, xu, spike_out, xspike);
        end
      end
      $display("exact run: %0d spikes, %0d steps at the input limit", n_spk, n_floor);
      check(n_spk > 20 && n_floor > 0, "exact run exercised spiking and the input limit");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
