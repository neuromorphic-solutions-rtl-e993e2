// tb_data_sequencer: self-checking test of the training-data sequencer.
// Loads 10 distinct normal and 10 distinct abnormal records, then alternates image_signal
// between 1 and 2 (with 0 and 3 in between) for more than ten rounds. It checks that
// n_counter and a_counter advance only on their rising edges, wrap from 9 to 0, and that
// Digit is the record at the pointer; for image_signal 0 or 3 it keeps the last record.
module tb_data_sequencer;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, rec_we, rec_class;
  logic [1:0] image_signal;
  logic [REC_IDX_W-1:0] rec_idx, n_counter, a_counter;
  record_t rec_data, digit;
  int checks = 0, failures = 0, n_wraps = 0;

  data_sequencer dut (.clk(clk), .rst(rst), .image_signal(image_signal), .rec_we(rec_we),
                      .rec_class(rec_class), .rec_idx(rec_idx), .rec_data(rec_data),
                      .digit(digit), .n_counter(n_counter), .a_counter(a_counter));

  record_t nrec [10], arec [10];

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

  task automatic show(input logic [1:0] img, input int hold);
    @(negedge clk);
    image_signal = img;
    repeat (hold) @(negedge clk);
  endtask

  initial begin
    int n_exp, a_exp;
    rst = 1; rec_we = 0; rec_class = 0; rec_idx = '0; rec_data = '0; image_signal = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 10; i++) begin
        @(negedge clk);
        rec_we = 1; rec_class = c[0]; rec_idx = 4'(i);
        rec_data = record_t'({$urandom, $urandom}) | record_t'(1);
        if (c == 0) nrec[i] = rec_data; else arec[i] = rec_data;
      end
    @(negedge clk); rec_we = 0;
    check(digit == '0 && n_counter == 0 && a_counter == 0, "idle");
    n_exp = 0; a_exp = 0;
    for (int r = 0; r < 23; r++) begin
      // normal record
      show(2'd1, 3);
      n_exp = (n_exp == 9) ? 0 : n_exp + 1;
      if (n_exp == 0) n_wraps++;
      check(int'(n_counter) == n_exp && int'(a_counter) == a_exp,
            $sformatf("round %0d n=%0d a=%0d exp %0d %0d", r, n_counter, a_counter, n_exp, a_exp));
      check(digit == nrec[n_exp], "normal Digit");
      // abnormal record (1 -> 2 is a rising edge of bit 1 only)
      show(2'd2, 3);
      a_exp = (a_exp == 9) ? 0 : a_exp + 1;
      if (a_exp == 0) n_wraps++;
      check(int'(n_counter) == n_exp && int'(a_counter) == a_exp, "abnormal pointer");
      check(digit == arec[a_exp], "abnormal Digit");
      // 0 or 3: Digit keeps the abnormal record; 3 rises bit 0 from 2 -> normal pointer moves
      if (r % 3 == 0) begin
        show(2'd3, 2);
        n_exp = (n_exp == 9) ? 0 : n_exp + 1;
        if (n_exp == 0) n_wraps++;
        check(digit == arec[a_exp] && int'(n_counter) == n_exp, "image_signal 3");
        show(2'd0, 2);
        check(digit == arec[a_exp], "image_signal 0 after 3");
      end else begin
        show(2'd0, 2);
        check(digit == arec[a_exp] && int'(n_counter) == n_exp && int'(a_counter) == a_exp,
              "image_signal 0");
      end
    end
    check(n_wraps >= 3, "pointer wrap exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
