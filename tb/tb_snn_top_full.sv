// tb_snn_top_full: one complete train-and-test run of the classifier at its default size.
//
// Synthetic binarised ECG records stand in for real ones: a "normal" record has regularly
// spaced R peaks every 4 bits on even bit positions; an "abnormal" record has irregular
// spacing (6 and 8 bits) on odd positions and an extra premature beat. Ten records of each
// class are loaded into the data sequencer. Training alternates image_signal 1 / 2 over 11
// rounds, so both record pointers wrap. Each record is shown for 4 input periods with
// learning on. Then three unseen records of each class are presented through digit_noise,
// once with learning off and once with it left on.
// Checks: each test record makes its class's output neuron (37 normal, 38 abnormal) fire and
// the other stay silent; every step takes K + 41 clocks for K > 0 presynaptic spikes (42 for
// none); the synapse RAMs hold what the STDP units learned plus the fixed training synapses.
module tb_snn_top_full;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, run, en_stdp, rec_we, rec_class, ready, step_done, aer_halt, aer_multi;
  logic [1:0] image_signal, spike_out, clamped, syn_we;
  logic [REC_IDX_W-1:0] rec_idx, n_counter, a_counter;
  record_t digit_noise, rec_data, digit;
  logic [N_NEURONS-1:0] spikes;
  logic [31:0] step_count;
  int checks = 0, failures = 0;

  snn_top dut (
    .clk(clk), .rst(rst), .run(run), .image_signal(image_signal), .en_stdp(en_stdp),
    .digit_noise(digit_noise), .rec_we(rec_we), .rec_class(rec_class), .rec_idx(rec_idx),
    .rec_data(rec_data), .ready(ready), .spike_out(spike_out), .spikes(spikes),
    .step_done(step_done), .step_count(step_count), .digit(digit), .n_counter(n_counter),
    .a_counter(a_counter), .aer_halt(aer_halt), .aer_multi(aer_multi), .clamped(clamped),
    .syn_we(syn_we));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // R peaks every 4 bits on even positions, one peak dropped
  function automatic record_t normal_rec(input int start, input int drop);
    record_t r = '0;
    int j = 0;
    for (int b = start; b < N_IN; b += 4) begin
      if (j != drop) r[b] = 1'b1;
      j++;
    end
    return r;
  endfunction

  // irregular spacing on odd positions, plus a premature beat
  function automatic record_t abnormal_rec(input int start, input int ectopic);
    record_t r = '0;
    int b = start, j = 0;
    while (b < N_IN) begin
      r[b] = 1'b1;
      b += (j % 2 == 0) ? 6 : 8;
      j++;
    end
    if (ectopic < N_IN) r[ectopic] = 1'b1;
    return r;
  endfunction

  // step length monitor
  int cyc_since = 0, n_steps_checked = 0;
  always @(negedge clk) begin
    if (step_done) begin
      int k, exp_len;
      k = $countones(spikes[N_PRE-1:0]);
      exp_len = (k == 0) ? 42 : k + 41;
      if (step_count > 1) begin
        checks++;
        if (cyc_since != exp_len) begin
          failures++;
          $display("FAIL: step %0d took %0d clocks, expected %0d", step_count, cyc_since, exp_len);
        end
        n_steps_checked++;
      end
      cyc_since = 1;
    end else begin
      cyc_since++;
    end
  end

  int n37, n38;
  task automatic run_steps(input int n);
    n37 = 0; n38 = 0;
    for (int s = 0; s < n; s++) begin
      @(negedge clk);
      while (!step_done) @(negedge clk);
      n37 += spike_out[0];
      n38 += spike_out[1];
    end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; run = 0; en_stdp = 0; image_signal = 0; digit_noise = '0;
    rec_we = 0; rec_class = 0; rec_idx = '0; rec_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // load the training records
    for (int i = 0; i < N_RECORDS; i++) begin
      @(negedge clk);
      rec_we = 1; rec_class = 0; rec_idx = REC_IDX_W'(i);
      rec_data = normal_rec((i % 2 == 0) ? 4 : 6, i % 8);
      @(negedge clk);
      rec_class = 1;
      rec_data = abnormal_rec((i % 2 == 0) ? 1 : 3, 11 + 2 * (i % 10));
    end
    @(negedge clk); rec_we = 0;
    while (!ready) @(negedge clk);

    // training
    en_stdp = 1; run = 1;
    for (int r = 0; r < 11; r++) begin
      image_signal = 2'd1;
      run_steps(64);
      image_signal = 2'd2;
      run_steps(64);
    end

    $write("learned weights 37/38 per input: ");
    for (int i = 0; i < N_IN; i++) $write("%0d/%0d ", dut.g_out[0].u_stdp.u_wcnt.w[i], dut.g_out[1].u_stdp.u_wcnt.w[i]);
    $display("");
    // testing: unseen records through digit_noise, first with learning off, then again with
    // learning left on as during a live test
    image_signal = 2'd0;
    for (int pass = 0; pass < 2; pass++) begin
      en_stdp = (pass == 1);
      digit_noise = '0;
      run_steps(400);   // let the recovery variables of both neurons relax
      for (int t = 0; t < 6; t++) begin
        bit is_normal;
        is_normal = (t < 3);
        digit_noise = is_normal ? normal_rec((t % 2 == 0) ? 4 : 6, 7 - t)
                                : abnormal_rec((t % 2 == 0) ? 1 : 3, 13 + 4 * t);
        run_steps(16);
        $display("learning %0d, test record %0d (%s): neuron 37 fired %0d, neuron 38 fired %0d",
                 en_stdp, t, is_normal ? "normal" : "abnormal", n37, n38);
        if (is_normal) check(n37 > 0 && n38 == 0, "normal record classified by neuron 37");
        else           check(n38 > 0 && n37 == 0, "abnormal record classified by neuron 38");
        digit_noise = '0;
        run_steps(400);  // let the neurons settle between records
      end
    end
    run = 0;

    // RAM contents agree with the learned weights
    for (int n = 0; n < N_OUT; n++)
      for (int i = 0; i < N_PRE; i++) begin
        int ram_w, exp_w;
        ram_w = (n == 0) ? int'(dut.g_out[0].u_neuron.u_ram.mem[i]) : int'(dut.g_out[1].u_neuron.u_ram.mem[i]);
        if (i < N_IN) exp_w = (n == 0) ? int'(dut.g_out[0].u_stdp.u_wcnt.w[i]) : int'(dut.g_out[1].u_stdp.u_wcnt.w[i]);
        else          exp_w = (i == TRAIN_NORMAL + n) ? 1000 : 0;
        check(ram_w == exp_w, $sformatf("neuron %0d synapse %0d RAM %0d expected %0d", 37 + n, i, ram_w, exp_w));
      end
    check(n_steps_checked > 800, "step timing checked");
    $display("steps %0d", step_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
