// tb_training_neurons: self-checking test of the two training neurons.
// For every image_signal value, train setting and step phase, neuron 35 must fire only for
// image_signal 1 and neuron 36 only for image_signal 2, only in training and only in the
// phase TRAIN_OFFSET.
module tb_training_neurons;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, step, train;
  logic [2:0] phase;
  logic [1:0] image_signal, spikes;
  int checks = 0, failures = 0;

  training_neurons dut (.clk(clk), .rst(rst), .step(step), .phase(phase), .train(train),
                        .image_signal(image_signal), .spikes(spikes));

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
    rst = 1; step = 0; phase = '0; train = 0; image_signal = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int img = 0; img < 4; img++)
      for (int tr = 0; tr < 2; tr++)
        for (int ph = 0; ph < 8; ph++) begin
          logic [1:0] e;
          image_signal = 2'(img); train = tr[0]; phase = 3'(ph); step = 1;
          @(negedge clk);
          step = 0;
          e[0] = tr[0] && ph == 1 && img == 1;
          e[1] = tr[0] && ph == 1 && img == 2;
          check(spikes == e, $sformatf("img %0d train %0d phase %0d spikes %b", img, tr, ph, spikes));
          image_signal = 2'd0;   // no effect without step
          @(negedge clk);
          check(spikes == e, "holds between steps");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
