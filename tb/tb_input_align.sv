// tb_input_align: self-checking test of the input-align block.
// Random bursts of synaptic events are accumulated and compared with a reference sum,
// including the -140 lower limit, the clamped flag and the clearing on EN (also when an
// event coincides with EN).
module tb_input_align;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, en, syn_valid, clamped;
  weight_t syn_in;
  current_t i_out;
  int checks = 0, failures = 0, n_clamped = 0;

  input_align dut (.clk(clk), .rst(rst), .en(en), .syn_valid(syn_valid), .syn_in(syn_in),
                   .i_out(i_out), .clamped(clamped));

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
    int acc, exp_i, nev;
    rst = 1; en = 0; syn_valid = 0; syn_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    acc = 0;
    for (int step = 0; step < 300; step++) begin
      nev = $urandom_range(0, 12);
      for (int e = 0; e < nev; e++) begin
        @(negedge clk);
        syn_valid = 1;
        // mostly small weights, sometimes strongly negative
        syn_in = (step % 3 == 0) ? weight_t'(-$urandom_range(0, 100))
                                 : weight_t'($urandom_range(0, 200) - 60);
        acc += int'(syn_in);
      end
      @(negedge clk);
      syn_valid = 0;
      exp_i = (acc < -140) ? -140 : acc;
      #1;
      check(int'(i_out) == exp_i, $sformatf("step %0d I=%0d exp %0d", step, i_out, exp_i));
      check(clamped == (acc < -140), "clamped flag");
      if (clamped) n_clamped++;
      // EN, sometimes together with the first event of the next step
      en = 1;
      if (step % 5 == 0) begin
        syn_valid = 1; syn_in = weight_t'(7); acc = 7;
      end else begin
        acc = 0;
      end
      @(negedge clk);
      en = 0; syn_valid = 0;
      #1 check(int'(i_out) == acc, "after EN");
    end
    check(n_clamped > 10, "the -140 limit was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
