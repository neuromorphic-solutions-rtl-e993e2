// tb_stdp: self-checking test of the STDP learning unit.
// First the two single-pair cases of the design's STDP demonstration: a presynaptic spike
// one step before a postsynaptic spike raises the weight from 0 to 1; a postsynaptic spike
// one step before a presynaptic spike lowers it from 0 to -2. Then many steps of random
// pre/post spikes are compared with a reference model of the STDP rule. The reference keeps
// its own spike histories and weights, and the weights written out through WE/Addr/Weight
// must match it. Also checks the scan length (done N_SYN+1 clocks after EN_Addr) and that EN
// low stops all writes.
module tb_stdp;
  import snn_pkg::*;

  localparam int N = N_IN;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, en, en_addr, post_spike, we, busy, done;
  logic [N-1:0] pre_spikes;
  naddr_t addr;
  weight_t weight;
  int checks = 0, failures = 0, n_inc = 0, n_dec = 0;

  stdp dut (.clk(clk), .rst(rst), .en(en), .en_addr(en_addr), .pre_spikes(pre_spikes),
            .post_spike(post_spike), .addr(addr), .we(we), .weight(weight),
            .busy(busy), .done(done));

  int ram [N];          // what the neuron RAM would hold
  int ref_w [N];
  bit ref_pre [N][4];
  bit ref_post [4];
  int n_writes;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int decay(input int a, input int k);
    int r = a;
    for (int j = 0; j < k / 2; j++) r = r / 2;
    return r;
  endfunction

  // capture the write-out port
  always @(posedge clk) begin
    if (we) begin
      ram[addr] <= int'(weight);
      n_writes++;
    end
  end

  task automatic do_reset();
    rst = 1; en = 1; en_addr = 0; post_spike = 0; pre_spikes = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      ram[i] = 0; ref_w[i] = 0;
      for (int k = 0; k < 4; k++) ref_pre[i][k] = 0;
    end
    for (int k = 0; k < 4; k++) ref_post[k] = 0;
  endtask

  // one time step: present spikes, pulse EN_Addr, wait for done, update the reference
  task automatic do_step(input logic [N-1:0] pre, input bit post);
    int cyc;
    @(negedge clk);
    pre_spikes = pre; post_spike = post; en_addr = 1;
    @(negedge clk);
    en_addr = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == N + 1, $sformatf("scan length %0d", cyc));
    @(negedge clk);   // last write lands
    // reference
    for (int k = 3; k > 0; k--) ref_post[k] = ref_post[k-1];
    ref_post[0] = post;
    for (int i = 0; i < N; i++) begin
      int kp, kq, d;
      for (int k = 3; k > 0; k--) ref_pre[i][k] = ref_pre[i][k-1];
      ref_pre[i][0] = pre[i];
      kp = -1; kq = -1;
      for (int k = 3; k >= 0; k--) if (ref_pre[i][k]) kp = k;
      for (int k = 3; k >= 1; k--) if (ref_post[k]) kq = k;
      d = 0;
      if (ref_post[0] && kp >= 0) d = decay(1, kp);
      else if (ref_pre[i][0] && !ref_post[0] && kq >= 1) d = -decay(2, kq);
      if (en) begin
        if (d > 0) n_inc++;
        if (d < 0) n_dec++;
        ref_w[i] += d;
        if (ref_w[i] > 1023) ref_w[i] = 1023;
        if (ref_w[i] < -1024) ref_w[i] = -1024;
      end
    end
    for (int i = 0; i < N; i++)
      check(ram[i] == ref_w[i], $sformatf("synapse %0d weight %0d exp %0d", i, ram[i], ref_w[i]));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_writes = 0;
    // potentiation: pre before post
    do_reset();
    do_step(N'(1), 0);
    do_step('0, 1);
    check(ram[0] == 1, $sformatf("pre then post: weight %0d, expected 0 -> 1", ram[0]));
    // depression: post before pre
    do_reset();
    do_step('0, 1);
    do_step(N'(1), 0);
    check(ram[0] == -2, $sformatf("post then pre: weight %0d, expected 0 -> -2", ram[0]));

    // random activity against the reference
    do_reset();
    for (int s = 0; s < 300; s++) begin
      logic [N-1:0] pre;
      for (int i = 0; i < N; i++) pre[i] = ($urandom_range(0, 5) == 0);
      en = (s % 50) < 40;
      do_step(pre, $urandom_range(0, 3) == 0);
    end
    // EN low: no writes at all
    en = 0;
    n_writes = 0;
    for (int s = 0; s < 10; s++) do_step({N{1'b1}}, s % 2);
    check(n_writes == 0, "no writes with EN low");
    check(n_inc > 50 && n_dec > 50, $sformatf("coverage inc %0d dec %0d", n_inc, n_dec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
