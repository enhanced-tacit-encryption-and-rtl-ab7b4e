// etacit_decryptor: E-TACIT block decryption, one character per cycle.
//
// Undoes etacit_encryptor. Cipher character i of a block (in arrival order)
// goes through a two-stage pipeline, with k = key byte (i mod KEY_BITS/8)
// and j = J[i mod SEQ_LEN]:
//   1. bit reverse          : b = reverse(cipher)
//   2. inverse bit XOR (J)  : m = b XOR j
//   3. inverse TACIT logic  : n = m XOR k^k
//   4. XOR with the key     : c = n XOR k       (the character)
//   5. re-shuffle           : written to the block RAM at address i XOR pmask
// When the whole block is in the RAM it is streamed out in order. The steps
// and their order follow the E-TACIT decryption flow; their exact form is the
// inverse of this design's encryptor.
//
// Interface: `in_*` is a valid/ready cipher stream (in_ready is high while a
// block is being received); `out_*` is the valid/ready plaintext stream with
// `out_last` on the last character. key and j_seq must be stable for the
// block. Timing: cipher characters are accepted one per cycle; the first
// plaintext character is valid 2 cycles after the clock edge that accepts the
// last cipher character (RAM write, RAM read), then one per cycle while
// out_ready is high.
module etacit_decryptor
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

  typedef enum logic [1:0] {D_RECV, D_DRAIN, D_SEND} dstate_t;
  dstate_t state;

  logic [AW-1:0] in_cnt, rd_cnt;
  logic          rd_done;
  logic [AW-1:0] pmask;
  logic          s1_v;
  logic [AW-1:0] s1_i;
  byte_t         s1_m;
  logic          issue, ov, ol;
  logic          in_fire;

  function automatic byte_t key_byte(input logic [KEY_BITS-1:0] k, input logic [AW-1:0] i);
    return k[(32'(i) % KB) * 8 +: 8];
  endfunction

  assign pmask    = key[AW-1:0];
  assign in_ready = (state == D_RECV);
  assign in_fire  = in_valid && in_ready;
  assign issue    = (state == D_SEND) && !rd_done && (!ov || out_ready);

  dpram #(.DW(8), .DEPTH(N_CHARS)) u_buf (
    .clk   (clk),
    .we    (s1_v),
    .waddr (s1_i ^ pmask),
    .wdata ((s1_m ^ self_pow(key_byte(key, s1_i))) ^ key_byte(key, s1_i)),
    .re    (issue),
    .raddr (rd_cnt),
    .rdata (out_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= D_RECV;
      in_cnt  <= '0;
      rd_cnt  <= '0;
      rd_done <= 1'b0;
      s1_v    <= 1'b0;
      s1_i    <= '0;
      s1_m    <= '0;
      ov      <= 1'b0;
      ol      <= 1'b0;
    end else begin
      // stage 1: bit reverse and inverse bit XOR
      s1_v <= in_fire;
      s1_i <= in_cnt;
      s1_m <= bit_rev8(in_data) ^ j_seq[32'(in_cnt) % SEQ_LEN];

      unique case (state)
        D_RECV: if (in_fire) begin
          in_cnt <= in_cnt + 1'b1;
          if (in_cnt == AW'(N_CHARS - 1)) state <= D_DRAIN;
        end
        D_DRAIN: begin   // last character is being written this cycle
          state   <= D_SEND;
          rd_cnt  <= '0;
          rd_done <= 1'b0;
        end
        default: begin   // D_SEND
          if (issue) begin
            rd_cnt <= rd_cnt + 1'b1;
            if (rd_cnt == AW'(N_CHARS - 1)) rd_done <= 1'b1;
          end
          if (ov && out_ready && ol) begin
            state  <= D_RECV;
            in_cnt <= '0;
          end
        end
      endcase

      if (!ov || out_ready) begin
        ov <= issue;
        ol <= issue && (rd_cnt == AW'(N_CHARS - 1));
      end
    end
  end

  assign out_valid = ov;
  assign out_last  = ol;

endmodule
