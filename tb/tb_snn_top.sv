// tb_snn_top: end-to-end test of the classifier that also counts every mechanism.
//
// Instance dut has default parameters and runs the complete train-and-test flow of
// tb_snn_top_full: synthetic normal records with R peaks on even bits, abnormal ones on odd
// bits, 11 alternating training rounds, then three unseen test records per class through
// digit_noise. Instance dut_ltd places the teacher spike late in the input period
// (TRAIN_OFFSET = 6). Each output spike is then followed two steps later by the next input
// spike, so STDP depresses the active synapses until their summed weight falls below the
// input-align limit. In test mode that record must then not make the neuron fire, because
// the -140 limit keeps the negative current from causing a rebound spike.
// Counted mechanisms, each of which must occur: AER serialisation of simultaneous spikes
// (neurons halted), training-neuron spikes, output-neuron spikes, STDP potentiation, STDP
// depression, the input-align limit, wrap of both record pointers, and the switches between
// training classes and into test mode.
module tb_snn_top;
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

  // second instance: late teacher spike, drives depression and the current limit
  logic run2, en2, step_done2, ready2, halt2, multi2;
  logic [1:0] img2, spk2, clamped2, syn_we2;
  logic [REC_IDX_W-1:0] nc2, ac2;
  record_t noise2, digit2;
  logic [N_NEURONS-1:0] spikes2;
  logic [31:0] step_count2;

  snn_top #(.TRAIN_OFFSET(6)) dut_ltd (
    .clk(clk), .rst(rst), .run(run2), .image_signal(img2), .en_stdp(en2),
    .digit_noise(noise2), .rec_we(rec_we), .rec_class(rec_class), .rec_idx(rec_idx),
    .rec_data(rec_data), .ready(ready2), .spike_out(spk2), .spikes(spikes2),
    .step_done(step_done2), .step_count(step_count2), .digit(digit2), .n_counter(nc2),
    .a_counter(ac2), .aer_halt(halt2), .aer_multi(multi2), .clamped(clamped2),
    .syn_we(syn_we2));

  // mechanism counters
  int c_serial = 0, c_train_spk = 0, c_out_spk = 0, c_ltp = 0, c_ltd = 0, c_clamp = 0;
  int c_nwrap = 0, c_awrap = 0, c_class_switch = 0, c_test_mode = 0;
  int shadow0 [N_IN], shadow1 [N_IN], shadow2 [N_IN];
  logic [REC_IDX_W-1:0] nc_q, ac_q;
  logic [1:0] img_q;
  initial for (int i = 0; i < N_IN; i++) begin shadow0[i] = 0; shadow1[i] = 0; shadow2[i] = 0; end
  always @(posedge clk) begin
    if (halt2 && multi2 || aer_halt && aer_multi) c_serial++;
    if (step_done) begin
      c_train_spk += $countones(spikes[36:35]);
      c_out_spk   += $countones(spike_out);
    end
    if (dut.u_ctrl.neuron_en && (clamped != 0)) c_clamp++;
    if (dut_ltd.u_ctrl.neuron_en && (clamped2 != 0)) c_clamp++;
    if (syn_we[0]) begin
      if (int'(dut.g_out[0].u_stdp.weight) > shadow0[dut.g_out[0].u_stdp.addr]) c_ltp++; else c_ltd++;
      shadow0[dut.g_out[0].u_stdp.addr] = int'(dut.g_out[0].u_stdp.weight);
    end
    if (syn_we[1]) begin
      if (int'(dut.g_out[1].u_stdp.weight) > shadow1[dut.g_out[1].u_stdp.addr]) c_ltp++; else c_ltd++;
      shadow1[dut.g_out[1].u_stdp.addr] = int'(dut.g_out[1].u_stdp.weight);
    end
    if (syn_we2[0]) begin
      if (int'(dut_ltd.g_out[0].u_stdp.weight) > shadow2[dut_ltd.g_out[0].u_stdp.addr]) c_ltp++; else c_ltd++;
      shadow2[dut_ltd.g_out[0].u_stdp.addr] = int'(dut_ltd.g_out[0].u_stdp.weight);
    end
    if (nc_q == REC_IDX_W'(9) && n_counter == '0) c_nwrap++;
    if (ac_q == REC_IDX_W'(9) && a_counter == '0) c_awrap++;
    if (img_q != image_signal && image_signal != 2'd0 && img_q != 2'd0) c_class_switch++;
    if (img_q != 2'd0 && image_signal == 2'd0) c_test_mode++;
    nc_q <= n_counter; ac_q <= a_counter; img_q <= image_signal;
  end

  // stimulus of dut_ltd: train neuron 37 on one normal record, then test it
  bit ltd_done = 0;
  int ltd_spikes_test = 0;
  record_t trained2;
  initial begin
    run2 = 0; en2 = 0; img2 = 2'd0; noise2 = '0;
    @(negedge clk);
    while (rst || !ready2) @(negedge clk);
    repeat (60) @(negedge clk);     // records are loaded by then
    en2 = 1; run2 = 1; img2 = 2'd1;
    for (int s = 0; s < 200; s++) begin
      @(negedge clk);
      while (!step_done2) @(negedge clk);
    end
    // test the trained record with learning off
    trained2 = digit2;
    img2 = 2'd0; en2 = 0;
    for (int s = 0; s < 400; s++) begin
      @(negedge clk);
      while (!step_done2) @(negedge clk);
    end
    noise2 = trained2;
    for (int s = 0; s < 64; s++) begin
      @(negedge clk);
      while (!step_done2) @(negedge clk);
      ltd_spikes_test += spk2[0];
    end
    run2 = 0;
    ltd_done = 1;
  end

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
    // testing: unseen records through digit_noise, no learning
    image_signal = 2'd0; en_stdp = 0;
    digit_noise = '0;
    run_steps(400);   // let the recovery variables of both neurons relax
    for (int t = 0; t < 6; t++) begin
      bit is_normal;
      is_normal = (t < 3);
      digit_noise = is_normal ? normal_rec((t % 2 == 0) ? 4 : 6, 7 - t)
                              : abnormal_rec((t % 2 == 0) ? 1 : 3, 13 + 4 * t);
      run_steps(16);
      $display("test record %0d (%s): neuron 37 fired %0d, neuron 38 fired %0d",
               t, is_normal ? "normal" : "abnormal", n37, n38);
      if (is_normal) check(n37 > 0 && n38 == 0, "normal record classified by neuron 37");
      else           check(n38 > 0 && n37 == 0, "abnormal record classified by neuron 38");
      digit_noise = '0;
      run_steps(400);  // let the neurons settle between records
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
    while (!ltd_done) @(negedge clk);
    // depressed synapses of the trained record
    begin
      int n_neg;
      n_neg = 0;
      for (int i = 0; i < N_IN; i++)
        if (noise2[i] && int'(dut_ltd.g_out[0].u_stdp.u_wcnt.w[i]) < 0) n_neg++;
      check(n_neg == $countones(noise2) && n_neg > 0, $sformatf("late teacher depresses all %0d active synapses (%0d)", $countones(noise2), n_neg));
    end
    check(ltd_spikes_test == 0, "negative current limited: no false spike");
    $display("mechanisms: AER serialisation %0d, training spikes %0d, output spikes %0d, potentiation %0d, depression %0d, current limit %0d, n wrap %0d, a wrap %0d, class switches %0d, test-mode entries %0d",
             c_serial, c_train_spk, c_out_spk, c_ltp, c_ltd, c_clamp, c_nwrap, c_awrap, c_class_switch, c_test_mode);
    check(c_serial > 0, "AER serialisation happened");
    check(c_train_spk > 0, "training neurons fired");
    check(c_out_spk > 0, "output neurons fired");
    check(c_ltp > 0, "STDP potentiation happened");
    check(c_ltd > 0, "STDP depression happened");
    check(c_clamp > 0, "input-align limit acted");
    check(c_nwrap > 0 && c_awrap > 0, "record pointers wrapped");
    check(c_class_switch > 0, "training class switched");
    check(c_test_mode > 0, "switched into test mode");
    $display("steps %0d", step_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
