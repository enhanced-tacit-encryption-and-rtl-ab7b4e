// key_gen: the E-TACIT "4H" key generator.
//
// After the two routers of a secure link have exchanged their random
// sequences J and K, each of them runs this block and obtains the same
// KEY_BITS-bit key. It works in three steps:
//  1. count, over the 2*SEQ_LEN characters of J and K, the lower-case letters
//     (s), digits (t), upper-case letters (u) and special characters (v);
//  2. for every 32-bit key word w, run hash function H-(w mod 4 + 1) on the
//     table row (J[w mod SEQ_LEN] + K[w mod SEQ_LEN]) mod 10, so that key word
//     0 is selected by the first values of the sequences;
//  3. store the hash result as key word w (word 0 in key[31:0]).
// The class counts, the four hash functions and the row taken from the random
// sequence follow the E-TACIT scheme; how the rows are picked for words after
// the first, the 32-bit word size and the use of both J and K are this
// design's choices.
//
// The hash unit and the key register run on a gated clock that is enabled
// only while a key is being generated (clock gating, as the scheme asks for).
//
// Interface and timing: pulse `start` with j_seq/k_seq stable; `key_valid`
// drops at once and rises when all KEY_BITS/32 words are written, about
// (exponent + 4) cycles per word. `key` holds its value until the next start.
module key_gen
  import etacit_pkg::*;
#(
  parameter int unsigned KEY_BITS = 1024,
  parameter int unsigned SEQ_LEN  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [SEQ_LEN-1:0][7:0]  j_seq,
  input  logic [SEQ_LEN-1:0][7:0]  k_seq,
  output logic                     busy,
  output logic                     key_valid,
  output logic [KEY_BITS-1:0]      key
);

  localparam int unsigned NW = KEY_BITS / HASH_W;
  localparam int unsigned WW = (NW > 1) ? $clog2(NW) : 1;

  initial begin
    assert (KEY_BITS % HASH_W == 0 && NW >= 1)
      else $error("KEY_BITS must be a multiple of %0d", HASH_W);
    assert (2 * SEQ_LEN <= 255) else $error("SEQ_LEN too large for 8-bit counts");
  end

  typedef enum logic [2:0] {K_IDLE, K_COUNT, K_ISSUE, K_WAIT, K_DONE} kstate_t;
  kstate_t state;

  byte_t         cs, ct, cu, cv;      // class counts
  logic [WW-1:0] widx;
  logic          gclk;
  logic          h_start, h_busy, h_done;
  hword_t        h_result;
  logic [1:0]    h_func;
  logic [3:0]    h_row;

  // ---- combinational class counts over J and K
  byte_t n_s, n_t, n_u, n_v;
  always_comb begin
    n_s = '0; n_t = '0; n_u = '0; n_v = '0;
    for (int i = 0; i < SEQ_LEN; i++) begin
      if (is_lower(j_seq[i])) n_s++; else if (is_digit(j_seq[i])) n_t++;
      else if (is_upper(j_seq[i])) n_u++; else n_v++;
      if (is_lower(k_seq[i])) n_s++; else if (is_digit(k_seq[i])) n_t++;
      else if (is_upper(k_seq[i])) n_u++; else n_v++;
    end
  end

  // ---- row and function of the current word
  logic [8:0] row_sum;
  always_comb begin
    row_sum = 9'(j_seq[32'(widx) % SEQ_LEN]) + 9'(k_seq[32'(widx) % SEQ_LEN]);
    h_row   = 4'(row_sum % 9'd10);
    h_func  = widx[1:0];
  end
  // a one-word key has WW = 1 and widx[1] would not exist
  if (WW < 2) begin : g_small
    initial assert (NW == 1) else $error("unexpected word index width");
  end

  // ---- control FSM (free-running clock)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= K_IDLE;
      cs        <= '0; ct <= '0; cu <= '0; cv <= '0;
      widx      <= '0;
      key_valid <= 1'b0;
    end else begin
      unique case (state)
        K_IDLE: if (start) begin
          key_valid <= 1'b0;
          state     <= K_COUNT;
        end
        K_COUNT: begin
          cs <= n_s; ct <= n_t; cu <= n_u; cv <= n_v;
          widx  <= '0;
          state <= K_ISSUE;
        end
        K_ISSUE: state <= K_WAIT;
        K_WAIT: if (h_done) begin
          if (32'(widx) == NW - 1) state <= K_DONE;
          else begin
            widx  <= widx + 1'b1;
            state <= K_ISSUE;
          end
        end
        default: begin  // K_DONE
          key_valid <= 1'b1;
          state     <= K_IDLE;
        end
      endcase
    end
  end

  assign h_start = (state == K_ISSUE);
  assign busy    = (state != K_IDLE);

  // ---- gated datapath
  clock_gate u_cg (
    .clk     (clk),
    .en      (state != K_IDLE),
    .test_en (1'b0),
    .gclk    (gclk)
  );

  hash_unit u_hash (
    .clk    (gclk),
    .rst_n  (rst_n),
    .start  (h_start),
    .func   (h_func),
    .row    (h_row),
    .cnt_s  (cs),
    .cnt_t  (ct),
    .cnt_u  (cu),
    .cnt_v  (cv),
    .busy   (h_busy),
    .done   (h_done),
    .result (h_result)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) key <= '0;
    else if (state == K_WAIT && h_done) key[32'(widx)*HASH_W +: HASH_W] <= h_result;
  end

endmodule
