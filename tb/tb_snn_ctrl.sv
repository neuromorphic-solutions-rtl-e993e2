// tb_snn_ctrl: self-checking test of the time-step controller.
// Checks the start-up load (every RAM address once, W_TRAIN only at the training-neuron
// address of each output neuron), then runs steps against emulated AER and STDP units that
// answer after random delays. For every step it checks the phase order: step, then
// aer_load, then neuron_en after aer_done, then stdp_en_addr. It also checks the step length
// (1 + (D_aer + 1) + 1 + (D_stdp + 1) clocks), the step phase counting modulo IN_PERIOD,
// step_count, and that the controller stops when run goes low.
module tb_snn_ctrl;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, run, aer_done, stdp_done, ready, step, aer_load, neuron_en, stdp_en_addr;
  logic init_we, step_done;
  phase_t state;
  naddr_t init_addr;
  weight_t init_w [N_OUT];
  logic [2:0] phase_cnt;
  logic [31:0] step_count;
  int checks = 0, failures = 0;

  snn_ctrl dut (.clk(clk), .rst(rst), .run(run), .aer_done(aer_done), .stdp_done(stdp_done),
                .state(state), .ready(ready), .step(step), .aer_load(aer_load),
                .neuron_en(neuron_en), .stdp_en_addr(stdp_en_addr), .init_we(init_we),
                .init_addr(init_addr), .init_w(init_w), .phase_cnt(phase_cnt),
                .step_count(step_count), .step_done(step_done));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // emulated responders
  int d_aer, d_stdp;
  // they act like registers: a request seen at a clock edge is answered d clocks later
  initial begin
    aer_done = 0; stdp_done = 0;
    forever begin
      @(posedge clk);
      if (aer_load) fork begin
        repeat (d_aer - 1) @(posedge clk);
        aer_done <= 1; @(posedge clk); aer_done <= 0;
      end join_none
      if (stdp_en_addr) fork begin
        repeat (d_stdp - 1) @(posedge clk);
        stdp_done <= 1; @(posedge clk); stdp_done <= 0;
      end join_none
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_init, t_step, t_load, t_en, t_learn, last_done, cyc;
    bit seen [N_PRE];
    rst = 1; run = 0; d_aer = 1; d_stdp = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    n_init = 0;
    for (int i = 0; i < N_PRE; i++) seen[i] = 0;
    while (!ready) begin
      check(init_we, "init_we during start-up");
      seen[init_addr] = 1;
      check(int'(init_w[0]) == ((int'(init_addr) == 35) ? 1000 : 0), "init weight neuron 37");
      check(int'(init_w[1]) == ((int'(init_addr) == 36) ? 1000 : 0), "init weight neuron 38");
      n_init++;
      @(negedge clk);
    end
    check(n_init == N_PRE, $sformatf("start-up length %0d", n_init));
    for (int i = 0; i < N_PRE; i++) check(seen[i], "every address initialised");
    check(!init_we && state == PH_IDLE, "idle after start-up");
    repeat (3) @(negedge clk);
    check(state == PH_IDLE && !step, "no steps without run");

    run = 1;
    cyc = 0; last_done = -1;
    for (int s = 0; s < 40; s++) begin
      int exp_len;
      d_aer = $urandom_range(1, 40); d_stdp = $urandom_range(1, 40);
      exp_len = 1 + (d_aer + 1) + 1 + (d_stdp + 1);
      t_load = -1; t_en = -1; t_learn = -1;
      // the cycle that carries step_done is already the next step when run is high
      while (!step) @(negedge clk);
      t_step = 0;
      begin
        int c;
        c = 0;
        do begin
          @(negedge clk);
          c++;
          if (aer_load) t_load = c;
          if (neuron_en) t_en = c;
          if (stdp_en_addr) t_learn = c;
        end while (!step_done && c < 200);
        check(t_load == 1 && t_en == t_load + d_aer + 1 && t_learn == t_en + 1,
              $sformatf("phase order %0d %0d %0d", t_load, t_en, t_learn));
        check(c + 1 == exp_len, $sformatf("step length %0d exp %0d", c + 1, exp_len));
      end
      check(int'(step_count) == s, "step_count");
      check(int'(phase_cnt) == s % 8, "phase counter at step_done");
      @(negedge clk);
      check(int'(step_count) == s + 1, "step_count increments");
      check(int'(phase_cnt) == (s + 1) % 8, $sformatf("phase counter %0d state %0d", phase_cnt, state));
      check(step, "next step follows");
    end
    run = 0;
    repeat (100) @(negedge clk);
    check(state == PH_IDLE, "stops when run is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
