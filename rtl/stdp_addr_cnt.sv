// stdp_addr_cnt: synapse address counter of the STDP unit ("Addr cnt").
//
// A pulse on en_addr (EN_Addr) starts a scan: syn_addr then steps through 0 .. N_SYN-1, one
// synapse per clock, with active high for each of those cycles. done pulses in the cycle
// after the last address. An en_addr that arrives during a scan is ignored. That the counter
// walks all synapses once per time step is this implementation's reading of the design's
// address counter, which only names Syn_Addr, CLK, EN and EN_Addr.
module stdp_addr_cnt
  import snn_pkg::*;
#(
  parameter int N_SYN = N_IN
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   en_addr,   // EN_Addr: start a scan
  output naddr_t syn_addr,  // Syn_Addr
  output logic   active,    // syn_addr is valid
  output logic   done       // scan finished (one-cycle pulse)
);

  always_ff @(posedge clk) begin
    if (rst) begin
      syn_addr <= '0;
      active   <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (active) begin
        if (int'(syn_addr) == N_SYN - 1) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          syn_addr <= syn_addr + 1'b1;
        end
      end else if (en_addr) begin
        active   <= 1'b1;
        syn_addr <= '0;
      end
    end
  end

endmodule
