// tb_stdp_id_sel: exhaustive self-checking test of the increment/decrement selector.
// Every combination of 4-step pre and post histories is compared with the STDP rule written
// out independently: nearest spike, halving of A every two steps of separation.
module tb_stdp_id_sel;
  import snn_pkg::*;

  logic [3:0] pre_hist, post_hist;
  logic incr, decr;
  weight_t mag;
  int checks = 0, failures = 0, n_inc = 0, n_dec = 0;

  stdp_id_sel dut (.pre_hist(pre_hist), .post_hist(post_hist), .incr(incr), .decr(decr), .mag(mag));

  // A * exp(-k/tau) approximated as a halving for every two steps
  function automatic int decay(input int a, input int k);
    int r = a;
    for (int j = 0; j < k / 2; j++) r = r / 2;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16; p++) begin
      for (int q = 0; q < 16; q++) begin
        int e_inc, e_dec, e_mag, kp, kq;
        pre_hist = 4'(p); post_hist = 4'(q);
        e_inc = 0; e_dec = 0; e_mag = 0;
        kp = -1; kq = -1;
        for (int k = 3; k >= 0; k--) if (p[k]) kp = k;
        for (int k = 3; k >= 1; k--) if (q[k]) kq = k;
        if (q[0] && kp >= 0) begin
          e_mag = decay(1, kp); e_inc = (e_mag != 0);
        end else if (p[0] && !q[0] && kq >= 1) begin
          e_mag = decay(2, kq); e_dec = (e_mag != 0);
        end
        #1;
        checks++;
        if (incr !== 1'(e_inc) || decr !== 1'(e_dec) || ((e_inc || e_dec) && int'(mag) != e_mag)) begin
          failures++;
          $display("FAIL pre=%b post=%b: incr=%0d decr=%0d mag=%0d exp %0d %0d %0d",
                   pre_hist, post_hist, incr, decr, mag, e_inc, e_dec, e_mag);
        end
        n_inc += e_inc; n_dec += e_dec;
      end
    end
    checks++;
    if (n_inc == 0 || n_dec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
