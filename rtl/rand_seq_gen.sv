// rand_seq_gen: random character sequence generator (the sequences J and K).
//
// In the E-TACIT key exchange each of the two communicating routers generates
// a random sequence, the two sequences are exchanged, and both routers derive
// the key from them. This block produces SEQ_LEN printable ASCII characters
// (0x21..0x7e, so that every character falls in one of the four classes the
// hash functions count). A 16-bit Fibonacci LFSR (taps 16,14,13,11) is stepped
// 8 times per character; the character is 0x21 + (lfsr[7:0] mod 94). The
// generator and the seed are this design's choice: the scheme only says that
// the sequences are random.
//
// Interface and timing: pulse `start`; one character is produced per cycle and
// `done` pulses SEQ_LEN+1 cycles later, after which `seq` holds the sequence
// (character 0 in seq[0]) until the next `start`. The LFSR keeps running from
// one sequence to the next, so every session gets a new sequence.
module rand_seq_gen
  import etacit_pkg::*;
#(
  parameter int unsigned SEQ_LEN = 16,
  parameter logic [15:0] SEED    = 16'hACE1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  output logic [SEQ_LEN-1:0][7:0]    seq
);

  localparam int unsigned IW = (SEQ_LEN > 1) ? $clog2(SEQ_LEN) : 1;

  function automatic logic [15:0] lfsr_step8(input logic [15:0] x);
    logic [15:0] r;
    r = x;
    for (int i = 0; i < 8; i++) r = {r[14:0], r[15] ^ r[13] ^ r[12] ^ r[10]};
    return r;
  endfunction

  logic [15:0]   lfsr;
  logic [15:0]   lfsr_nxt;
  logic [IW-1:0] idx;
  logic          running;

  assign lfsr_nxt = lfsr_step8(lfsr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr    <= (SEED == 16'h0) ? 16'h1 : SEED;
      idx     <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      seq     <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          idx     <= '0;
        end
      end else begin
        lfsr     <= lfsr_nxt;
        seq[idx] <= 8'h21 + 8'(lfsr_nxt[7:0] % 8'd94);
        if (idx == IW'(SEQ_LEN - 1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign busy = running;

endmodule
