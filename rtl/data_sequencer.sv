// data_sequencer: presents the stored training records to the network.
//
// Holds N_RECORDS normal and N_RECORDS abnormal 35-bit binarised ECG records and two array
// pointers, n_counter and a_counter. Following the design's pointer logic: a rising edge of
// image_signal[0] advances n_counter, otherwise a rising edge of image_signal[1] advances
// a_counter, and each pointer wraps to 0 after N_RECORDS-1. The output Digit is the normal
// record at n_counter when image_signal = 1, the abnormal record at a_counter when
// image_signal = 2, and otherwise keeps the record it last showed (the selection has no
// third branch), so it is all zeros only until the first record is selected.
//
// Timing: edges are detected synchronously against the previous clock's image_signal, and
// Digit is registered from the updated pointer, so Digit follows image_signal one clock
// later. The records are loaded through a write port (rec_we, rec_class 0 = normal /
// 1 = abnormal, rec_idx, rec_data) and cleared by reset. The load port and the synchronous edge
// detection are this implementation's choices.
module data_sequencer
  import snn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [1:0]           image_signal,  // Image_Signal
  input  logic                 rec_we,
  input  logic                 rec_class,     // 0 normal, 1 abnormal
  input  logic [REC_IDX_W-1:0] rec_idx,
  input  record_t              rec_data,
  output record_t              digit,         // Digit
  output logic [REC_IDX_W-1:0] n_counter,
  output logic [REC_IDX_W-1:0] a_counter
);

  record_t normal_seq   [N_RECORDS];
  record_t abnormal_seq [N_RECORDS];

  logic [1:0]           img_q;
  logic [REC_IDX_W-1:0] n_next, a_next;

  function automatic logic [REC_IDX_W-1:0] wrap_inc(input logic [REC_IDX_W-1:0] c);
    return (int'(c) == N_RECORDS - 1) ? '0 : c + 1'b1;
  endfunction

  always_comb begin
    n_next = n_counter;
    a_next = a_counter;
    if (image_signal[0] && !img_q[0])      n_next = wrap_inc(n_counter);
    else if (image_signal[1] && !img_q[1]) a_next = wrap_inc(a_counter);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      img_q     <= '0;
      n_counter <= '0;
      a_counter <= '0;
      digit     <= '0;
      for (int i = 0; i < N_RECORDS; i++) begin
        normal_seq[i]   <= '0;
        abnormal_seq[i] <= '0;
      end
    end else begin
      img_q     <= image_signal;
      n_counter <= n_next;
      a_counter <= a_next;
      if (image_signal == 2'd1)      digit <= normal_seq[n_next];
      else if (image_signal == 2'd2) digit <= abnormal_seq[a_next];
      if (rec_we && int'(rec_idx) < N_RECORDS) begin
        if (rec_class) abnormal_seq[rec_idx] <= rec_data;
        else           normal_seq[rec_idx]   <= rec_data;
      end
    end
  end

endmodule
