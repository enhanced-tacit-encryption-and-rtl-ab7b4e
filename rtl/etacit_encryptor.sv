// etacit_encryptor: E-TACIT block encryption, one character per cycle.
//
// A block of N_CHARS characters (N_CHARS*8 bits; 128 characters = 1024 bits)
// is first written into a dual-port RAM. It is then read out in shuffled
// order and every character goes through a pipelined datapath that applies,
// for output position i with key byte k = key byte (i mod KEY_BITS/8) and
// sequence byte j = J[i mod SEQ_LEN]:
//   1. permutation   : c = block[i XOR pmask], pmask = low address bits of
//                      key word 0 (N_CHARS must be a power of two)
//   2./3. XOR key    : n = c XOR k
//   4. TACIT logic   : m = n XOR k^k            (k^k taken mod 256)
//   5./6. bit XOR    : b = m XOR j              (the exchanged sequence J)
//   7./8. bit reverse: cipher = reverse(b)
// The order of the steps follows the E-TACIT encryption flow. The kind of
// shuffle, the byte-wise use of the key and the TACIT term as a plain XOR
// with k^k are this design's reading of that flow, chosen so that every step
// can be inverted by the decryptor.
//
// Interface: `in_*` is a valid/ready byte stream accepted while the block is
// loading (in_ready high); `out_*` is a valid/ready cipher stream, `out_last`
// marks the last character of a block. key and j_seq must be stable for the
// whole block. Timing: loading takes N_CHARS cycles at full rate; the first
// cipher character is valid 3 cycles after the clock edge that accepts the
// last plaintext character, then one per cycle while out_ready is high. A low out_ready
// stalls the whole pipeline. A new block is accepted after the last cipher
// character has left.
module etacit_encryptor
  import etacit_pkg::*;
#(
  parameter int unsigned N_CHARS  = 128,
  parameter int unsigned KEY_BITS = 1024,
  parameter int unsigned SEQ_LEN  = 16,
  localparam int unsigned AW      = (N_CHARS > 1) ? $clog2(N_CHARS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [KEY_BITS-1:0]     key,
  input  logic [SEQ_LEN-1:0][7:0] j_seq,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  byte_t                   in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output byte_t                   out_data,
  output logic                    out_last
);

  localparam int unsigned KB = KEY_BITS / 8;

  initial assert ((1 << AW) == N_CHARS) else $error("N_CHARS must be a power of two");

  typedef enum logic {E_LOAD, E_RUN} estate_t;
  estate_t state;

  logic [AW-1:0] wr_cnt, rd_cnt;
  logic          rd_done;           // all addresses of the block issued
  logic [AW-1:0] pmask;
  logic          adv;               // pipeline advances
  logic          issue;

  // pipeline stage registers: 1 = RAM output, 2 = after TACIT, 3 = output
  logic          v1, v2, v3;
  logic [AW-1:0] i1, i2;
  logic          l1, l2;
  byte_t         ram_q, m2;

  function automatic byte_t key_byte(input logic [KEY_BITS-1:0] k, input logic [AW-1:0] i);
    return k[(32'(i) % KB) * 8 +: 8];
  endfunction

  assign pmask    = key[AW-1:0];
  assign adv      = !v3 || out_ready;
  assign issue    = (state == E_RUN) && !rd_done && adv;
  assign in_ready = (state == E_LOAD);

  dpram #(.DW(8), .DEPTH(N_CHARS)) u_buf (
    .clk   (clk),
    .we    (in_valid && in_ready),
    .waddr (wr_cnt),
    .wdata (in_data),
    .re    (issue),
    .raddr (rd_cnt ^ pmask),
    .rdata (ram_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= E_LOAD;
      wr_cnt  <= '0;
      rd_cnt  <= '0;
      rd_done <= 1'b0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      i1 <= '0;   i2 <= '0;
      l1 <= 1'b0; l2 <= 1'b0;
      m2 <= '0;
      out_data <= '0;
      out_last <= 1'b0;
    end else begin
      unique case (state)
        E_LOAD: if (in_valid) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == AW'(N_CHARS - 1)) begin
            state   <= E_RUN;
            rd_cnt  <= '0;
            rd_done <= 1'b0;
          end
        end
        default: begin  // E_RUN
          if (issue) begin
            rd_cnt <= rd_cnt + 1'b1;
            if (rd_cnt == AW'(N_CHARS - 1)) rd_done <= 1'b1;
          end
          // block finished when its last character leaves the output
          if (v3 && out_ready && out_last) begin
            state  <= E_LOAD;
            wr_cnt <= '0;
          end
        end
      endcase

      if (adv) begin
        // stage 1: RAM read (address issued this cycle)
        v1 <= issue;
        i1 <= rd_cnt;
        l1 <= issue && (rd_cnt == AW'(N_CHARS - 1));
        // stage 2: XOR key, TACIT logic
        v2 <= v1;
        i2 <= i1;
        l2 <= l1;
        m2 <= (ram_q ^ key_byte(key, i1)) ^ self_pow(key_byte(key, i1));
        // stage 3: bit XOR with J, bit reverse
        v3       <= v2;
        out_last <= l2;
        out_data <= bit_rev8(m2 ^ j_seq[32'(i2) % SEQ_LEN]);
      end
    end
  end

  assign out_valid = v3;

endmodule
