// tb_input_neurons: self-checking test of the input neuron bank.
// For random records and every step phase, the spikes must equal the record bits in phase
// 0 and be all zero otherwise, and must hold between step strobes.
module tb_input_neurons;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, step;
  logic [2:0] phase;
  record_t digit, spikes;
  int checks = 0, failures = 0;

  input_neurons dut (.clk(clk), .rst(rst), .step(step), .phase(phase), .digit(digit), .spikes(spikes));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; step = 0; phase = '0; digit = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(spikes == '0, "reset");
    for (int t = 0; t < 200; t++) begin
      record_t d, held;
      d = record_t'({$urandom, $urandom});
      digit = d; phase = 3'(t % 8); step = 1;
      @(negedge clk);
      step = 0;
      check(spikes == ((t % 8 == 0) ? d : '0), $sformatf("step %0d", t));
      held = spikes;
      digit = ~d;
      @(negedge clk);
      check(spikes == held, "holds between steps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
