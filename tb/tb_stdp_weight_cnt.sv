// tb_stdp_weight_cnt: self-checking test of the STDP weight counters.
// Random increment/decrement requests on random synapses are compared with a reference
// weight array, including saturation at both limits, the EN gate and the one-clock
// WE/Addr/Weight write-out.
module tb_stdp_weight_cnt;
  import snn_pkg::*;

  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, en, valid, incr, decr, we;
  naddr_t syn_addr, addr;
  weight_t mag, weight;
  int checks = 0, failures = 0, n_sat = 0;

  stdp_weight_cnt #(.N_SYN(N)) dut (
    .clk(clk), .rst(rst), .en(en), .valid(valid), .syn_addr(syn_addr),
    .incr(incr), .decr(decr), .mag(mag), .we(we), .addr(addr), .weight(weight));

  int ref_w [N];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_we;
    int exp_w, a;
    rst = 1; en = 0; valid = 0; incr = 0; decr = 0; mag = '0; syn_addr = '0;
    for (int i = 0; i < N; i++) ref_w[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      a = $urandom_range(0, N - 1);
      syn_addr = naddr_t'(a);
      en    = $urandom_range(0, 7) != 0;
      valid = $urandom_range(0, 7) != 0;
      // synapses 0..3 drift up, 4..7 drift down, so both limits are reached
      incr = (a < 4) ? $urandom_range(0, 3) != 0 : $urandom_range(0, 3) == 0;
      decr = !incr && $urandom_range(0, 1);
      mag  = weight_t'($urandom_range(1, 60));
      exp_we = en && valid && (incr || decr);
      exp_w  = ref_w[a] + (incr ? int'(mag) : decr ? -int'(mag) : 0);
      if (exp_w > 1023)  begin exp_w = 1023;  n_sat++; end
      if (exp_w < -1024) begin exp_w = -1024; n_sat++; end
      @(negedge clk);
      check(we == exp_we, "WE");
      if (exp_we) begin
        ref_w[a] = exp_w;
        check(int'(addr) == a && int'(weight) == exp_w,
              $sformatf("write-out addr %0d w %0d exp %0d %0d", addr, weight, a, exp_w));
      end
    end
    check(n_sat > 20, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
