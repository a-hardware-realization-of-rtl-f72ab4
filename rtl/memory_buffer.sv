// memory_buffer: holds the next control frame until a pitch period starts.
//
// The computer sends a frame of 25 16-bit words, one per transfer with a
// valid/ready handshake: pitch period, voice amplitude, noise amplitude, mode
// word, voiced fricative threshold, then the 20 filter coefficients (for each
// section in turn its k_old, then its k_new). The five header words are kept
// in registers; the coefficients shift into a 20-word shift register. When
// all 25 words are in, 'full' rises and no more words are taken. At the start
// of the next pitch period the cycle timing raises 'load' for 20 clocks: each
// clock one coefficient shifts out at 'coef_out' into the coefficient memory.
// 'xfer', on the last of them, hands over the header and empties the buffer.
// A period that starts with no complete frame keeps the old parameters. The
// document gives the buffer's role (gains and pitch to the generators,
// coefficients shifted into the shift register memory); the word order and
// the handshake are this design's.
module memory_buffer
  import fs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      word_in,
  input  logic       word_valid,
  output logic       word_ready,
  output logic       full,
  input  logic       load,
  input  logic       xfer,
  output coef_t      coef_out,
  output frame_hdr_t hdr
);
  localparam int unsigned CNT_W = $clog2(FRAME_WORDS + 1);

  logic [CNT_W-1:0] count;
  word_t            hdr_mem  [HDR_WORDS];
  coef_t            coef_mem [N_STEP];
  logic             take;

  assign full       = (count == CNT_W'(FRAME_WORDS));
  assign word_ready = !full && !load;
  assign take       = word_valid && word_ready;
  assign coef_out   = coef_mem[0];

  assign hdr.pitch  = hdr_mem[W_PITCH];
  assign hdr.av     = coef_t'(hdr_mem[W_AV]);
  assign hdr.an     = coef_t'(hdr_mem[W_AN]);
  assign hdr.mode   = mode_t'(hdr_mem[W_MODE]);
  assign hdr.vf_thr = coef_t'(hdr_mem[W_VF_THR]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < HDR_WORDS; i++) hdr_mem[i] <= '0;
      for (int i = 0; i < N_STEP; i++)    coef_mem[i] <= '0;
    end else begin
      if (take) begin
        count <= count + 1'b1;
        if (count < CNT_W'(HDR_WORDS)) hdr_mem[count[2:0]] <= word_in;
      end
      if (load || (take && count >= CNT_W'(HDR_WORDS))) begin
        for (int i = 0; i < N_STEP - 1; i++) coef_mem[i] <= coef_mem[i+1];
        coef_mem[N_STEP-1] <= coef_t'(word_in);
      end
      if (xfer) count <= '0;
    end
  end

  a_no_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> !take);
  a_xfer_only_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    xfer |-> full && load);
endmodule
