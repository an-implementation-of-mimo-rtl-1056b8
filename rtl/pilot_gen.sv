// pilot_gen: HT pilot values for one or two space-time streams.
//
// The pilot on pilot subcarrier j (counted from the lowest frequency) of HT-data symbol n
// and stream iSTS is Psi(iSTS, (n + j) mod N_SP) * p(n + 3), where N_SP = 4 (20 MHz) or
// 6 (40 MHz), Psi is the IEEE 802.11n pilot pattern for the number of space-time streams,
// and p is the 127-periodic polarity sequence produced by the x^7 + x^4 + 1 scrambler from
// the all-ones state (bit 1 -> -1). The offset 3 counts the L-SIG and two HT-SIG symbols
// of the HT-mixed format. Outputs are sign flags (1 = -1) for the pilot index on pidx,
// available combinationally; next_sym advances the symbol, init restarts at n = 0.
module pilot_gen
  import tx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       bw40,
  input  logic       sts2,      // two space-time streams
  input  logic       next_sym,
  input  logic [2:0] pidx,
  output logic       neg0,
  output logic       neg1
);

  logic [6:0] lfsr;     // lfsr[i] = x(i+1)
  logic [2:0] nmod;     // n mod N_SP

  // Scrambler state after z = 3 steps from all ones (three zero outputs shifted in).
  localparam logic [6:0] LFSR_Z3 = 7'b1111000;

  logic       pol;
  logic [2:0] nsp;
  logic [3:0] sum;
  logic [2:0] col;
  logic [5:0] psi0, psi1;

  always_comb begin
    pol = lfsr[6] ^ lfsr[3];
    nsp = bw40 ? 3'd6 : 3'd4;
    sum = {1'b0, nmod} + {1'b0, pidx};
    col = (sum >= {1'b0, nsp}) ? 3'(sum - {1'b0, nsp}) : sum[2:0];
    // bit m set where Psi(iSTS, m) = -1
    case ({bw40, sts2})
      2'b00:   begin psi0 = 6'b001000; psi1 = 6'b000000; end  //  1  1  1 -1
      2'b01:   begin psi0 = 6'b001100; psi1 = 6'b000110; end  //  1  1 -1 -1 /  1 -1 -1  1
      2'b10:   begin psi0 = 6'b011000; psi1 = 6'b000000; end  //  1  1  1 -1 -1  1
      default: begin psi0 = 6'b111100; psi1 = 6'b001000; end  //  1  1 -1 -1 -1 -1 / 1 1 1 -1 1 1
    endcase
    neg0 = psi0[col] ^ pol;
    neg1 = psi1[col] ^ pol;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= LFSR_Z3; nmod <= '0;
    end else if (init) begin
      lfsr <= LFSR_Z3; nmod <= '0;
    end else if (next_sym) begin
      lfsr <= {lfsr[5:0], pol};
      nmod <= (nmod == nsp - 3'd1) ? 3'd0 : nmod + 3'd1;
    end
  end

endmodule
