// tx_ctrl: packet sequencer at the head of the transmitter.
//
// On a start pulse it captures the packet configuration (MCS, bandwidth, STBC, PSDU length,
// scrambler seed) and, one cycle later, pulses init to reset every downstream stage. It then
// emits the DATA field as 16-bit words, bit 0 first in time: one all-zero SERVICE word,
// the PSDU bytes two per word (first byte in bits 7:0), and afterwards all-zero words
// for the tail and pad bits until the converter signals that the last OFDM symbol has been
// framed (stop). busy stays high from start until the end of the packet at the IFFT (done).
// The byte input and the word output use valid/ready handshakes. The source design names the
// block only; its contents here are this design's choice.
module tx_ctrl
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  tx_cfg_t     cfg_in,
  output tx_cfg_t     cfg,
  output logic        init,
  output logic        busy,
  input  logic        done,
  // PSDU byte stream
  input  logic [7:0]  psdu_data,
  input  logic        psdu_valid,
  output logic        psdu_ready,
  // DATA field words
  output logic [15:0] word,
  output logic        word_valid,
  input  logic        word_ready,
  input  logic        stop
);

  typedef enum logic [1:0] {IDLE, SERVICE, DATA, PAD} st_e;
  st_e         st;
  logic [15:0] left;      // PSDU bytes still to read
  logic        half;      // low byte of the current word already held
  logic [7:0]  low;

  logic slot_free;
  assign slot_free  = !word_valid || word_ready;
  assign psdu_ready = (st == DATA) && slot_free && (left != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cfg <= '0; init <= 1'b0; busy <= 1'b0;
      left <= '0; half <= 1'b0; low <= '0; word <= '0; word_valid <= 1'b0;
    end else begin
      init <= 1'b0;
      if (word_ready) word_valid <= 1'b0;
      if (start) begin
        cfg <= cfg_in; init <= 1'b1; busy <= 1'b1;
        st <= SERVICE; left <= cfg_in.length; half <= 1'b0; word_valid <= 1'b0;
      end else begin
        if (done) busy <= 1'b0;
        case (st)
          SERVICE: if (!init && slot_free) begin
            word <= 16'h0000; word_valid <= 1'b1; st <= DATA;
          end
          DATA: begin
            if (left == 0) begin
              if (half && slot_free) begin
                word <= {8'h00, low}; word_valid <= 1'b1; half <= 1'b0;
              end
              if (!half || slot_free) st <= PAD;
            end else if (psdu_valid && psdu_ready) begin
              left <= left - 1'b1;
              if (half) begin
                word <= {psdu_data, low}; word_valid <= 1'b1; half <= 1'b0;
              end else begin
                low <= psdu_data; half <= 1'b1;
              end
            end
          end
          PAD: begin
            if (stop) st <= IDLE;
            else if (slot_free) begin word <= 16'h0000; word_valid <= 1'b1; end
          end
          default: ;
        endcase
      end
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || start)
                           word_valid && !word_ready |=> word_valid && $stable(word));

endmodule
