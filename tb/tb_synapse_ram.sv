// tb_synapse_ram: self-checking test of the synapse RAM.
// Writes random weights at every address in random order, with some writes disabled, and
// checks the asynchronous read port against a reference array. Also checks that a read
// beyond DEPTH gives 0 and that the read port follows DPRA within the same cycle.
module tb_synapse_ram;
  import snn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic    we;
  naddr_t  a, dpra;
  weight_t di, dpo;
  int checks = 0, failures = 0;

  synapse_ram dut (.clk(clk), .we(we), .a(a), .di(di), .dpra(dpra), .dpo(dpo));

  weight_t ref_mem [N_PRE];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; a = '0; di = '0; dpra = '0;
    // fill every entry
    for (int i = 0; i < N_PRE; i++) begin
      @(negedge clk);
      we = 1; a = naddr_t'(i); di = weight_t'($urandom); ref_mem[i] = di;
    end
    @(negedge clk); we = 0;
    // random writes, some with WE low
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a  = naddr_t'($urandom_range(0, N_PRE - 1));
      di = weight_t'($urandom);
      we = $urandom_range(0, 3) != 0;
      dpra = naddr_t'($urandom_range(0, N_PRE - 1));
      // the write lands at the next edge; the read shows the old contents until then
      #1 check(dpo == ref_mem[dpra], $sformatf("read addr %0d", dpra));
      if (we) ref_mem[a] = di;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < N_PRE; i++) begin
      dpra = naddr_t'(i);
      #1 check(dpo == ref_mem[i], $sformatf("final read addr %0d got %0d exp %0d", i, dpo, ref_mem[i]));
    end
    for (int i = N_PRE; i < 64; i++) begin
      dpra = naddr_t'(i);
      #1 check(dpo == '0, "out-of-range read not zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
