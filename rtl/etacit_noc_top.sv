// etacit_noc_top: secured data routing over a 3-D network-on-chip.
//
// A 2 x 4 x 2 mesh of 7-port routers (two layers joined by vertical TSV
// links) carries a secure channel from router R1 (node SRC_NODE) to router
// R2 (node DST_NODE):
//
//   plaintext -> etacit_encryptor -> ni_tx -> mesh3d -> ni_rx
//             -> etacit_decryptor -> plaintext
//
// Key set-up: on `session_start` R1 draws the random sequence J and R2 the
// random sequence K (rand_seq_gen). The sequences are exchanged (here: wired
// across) and each side runs its own 4H key generator (key_gen) on J and K,
// so both end up with the same KEY_BITS-bit key without the key itself ever
// crossing the network. `key_ready` rises when both keys are valid, and only
// then does the encryptor accept plaintext. Both sides also use J for the
// bit-XOR step of the cipher.
//
// The routers have NUM_VC virtual channels per link; the secure channel
// injects on VC 0. The local ports of all other nodes (the processing
// elements, which are not part of this design) are brought out as ports, with
// a per-VC ready vector, so other traffic can share
// the network with the secure channel. At SRC_NODE the injection port and at
// DST_NODE the ejection port belong to the secure channel: the external
// inputs there are ignored and the external outputs are idle.
//
// Timing: key set-up takes SEQ_LEN+1 cycles for the sequences plus the key
// generation time (typically about 400, at most about 1,300 cycles for a
// 1024-bit key). A block of
// KEY_BITS/8 characters is then encrypted at one character per cycle after
// loading, crosses the mesh as one wormhole packet and is decrypted and
// released at one character per cycle.
module etacit_noc_top
  import etacit_pkg::*;
#(
  parameter int unsigned X          = 2,
  parameter int unsigned Y          = 4,
  parameter int unsigned Z          = 2,
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned KEY_BITS   = 1024,
  parameter int unsigned N_CHARS    = KEY_BITS / 8,
  parameter int unsigned SEQ_LEN    = 16,
  parameter int unsigned SRC_NODE   = 0,
  parameter int unsigned DST_NODE   = X * Y * Z - 1,
  parameter logic [15:0] SEED_J     = 16'hACE1,
  parameter logic [15:0] SEED_K     = 16'h5EED,
  localparam int unsigned NODES     = X * Y * Z
) (
  input  logic              clk,
  input  logic              rst_n,
  // secure session
  input  logic              session_start,
  output logic              key_ready,
  output logic              key_match,
  // plaintext into R1
  input  logic              pt_in_valid,
  output logic              pt_in_ready,
  input  byte_t             pt_in_data,
  // recovered plaintext out of R2
  output logic              pt_out_valid,
  input  logic              pt_out_ready,
  output byte_t             pt_out_data,
  output logic              pt_out_last,
  output logic [15:0]       pkt_received,
  // local ports of the processing elements
  input  flit_t [NODES-1:0] pe_inj_flit,
  input  logic  [NODES-1:0] pe_inj_valid,
  output logic  [NODES-1:0][NUM_VC-1:0] pe_inj_ready,
  output flit_t [NODES-1:0] pe_ej_flit,
  output logic  [NODES-1:0] pe_ej_valid,
  input  logic  [NODES-1:0][NUM_VC-1:0] pe_ej_ready
);

  initial assert (SRC_NODE < NODES && DST_NODE < NODES && SRC_NODE != DST_NODE)
    else $error("bad SRC_NODE/DST_NODE");

  localparam int unsigned DX = DST_NODE % X;
  localparam int unsigned DY = (DST_NODE / X) % Y;
  localparam int unsigned DZ = DST_NODE / (X * Y);

  // ---------------------------------------------------------------- keys
  logic [SEQ_LEN-1:0][7:0] j_seq, k_seq;
  logic j_done, k_done, j_busy, k_busy;
  logic j_have, k_have;
  logic setup;                     // session started, key generation not yet begun
  logic kg_start;
  logic [KEY_BITS-1:0] key_r1, key_r2;
  logic kv_r1, kv_r2, kb_r1, kb_r2;

  rand_seq_gen #(.SEQ_LEN(SEQ_LEN), .SEED(SEED_J)) u_rand_j (
    .clk(clk), .rst_n(rst_n), .start(session_start),
    .busy(j_busy), .done(j_done), .seq(j_seq)
  );

  rand_seq_gen #(.SEQ_LEN(SEQ_LEN), .SEED(SEED_K)) u_rand_k (
    .clk(clk), .rst_n(rst_n), .start(session_start),
    .busy(k_busy), .done(k_done), .seq(k_seq)
  );

  // start key generation once both sequences have been exchanged
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_have <= 1'b0;
      k_have <= 1'b0;
      setup  <= 1'b0;
    end else if (session_start) begin
      j_have <= 1'b0;
      k_have <= 1'b0;
      setup  <= 1'b1;
    end else if (kg_start) begin
      j_have <= 1'b0;
      k_have <= 1'b0;
      setup  <= 1'b0;
    end else begin
      if (j_done) j_have <= 1'b1;
      if (k_done) k_have <= 1'b1;
    end
  end
  assign kg_start = j_have && k_have;

  key_gen #(.KEY_BITS(KEY_BITS), .SEQ_LEN(SEQ_LEN)) u_keygen_r1 (
    .clk(clk), .rst_n(rst_n), .start(kg_start),
    .j_seq(j_seq), .k_seq(k_seq),
    .busy(kb_r1), .key_valid(kv_r1), .key(key_r1)
  );

  key_gen #(.KEY_BITS(KEY_BITS), .SEQ_LEN(SEQ_LEN)) u_keygen_r2 (
    .clk(clk), .rst_n(rst_n), .start(kg_start),
    .j_seq(j_seq), .k_seq(k_seq),
    .busy(kb_r2), .key_valid(kv_r2), .key(key_r2)
  );

  assign key_ready = kv_r1 && kv_r2 && !setup && !session_start && !j_busy && !k_busy &&
                     !kb_r1 && !kb_r2;
  assign key_match = (key_r1 == key_r2);

  // ---------------------------------------------------------------- R1 side
  logic  enc_in_valid, enc_in_ready;
  logic  enc_out_valid, enc_out_ready, enc_out_last;
  byte_t enc_out_data;
  logic  tx_valid, tx_ready;
  flit_t tx_flit;

  assign enc_in_valid = pt_in_valid && key_ready;
  assign pt_in_ready  = enc_in_ready && key_ready;

  etacit_encryptor #(.N_CHARS(N_CHARS), .KEY_BITS(KEY_BITS), .SEQ_LEN(SEQ_LEN)) u_enc (
    .clk(clk), .rst_n(rst_n), .key(key_r1), .j_seq(j_seq),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_data(pt_in_data),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready),
    .out_data(enc_out_data), .out_last(enc_out_last)
  );

  ni_tx #(.N_CHARS(N_CHARS), .VC(0)) u_ni_tx (
    .clk(clk), .rst_n(rst_n),
    .dest({2'(DZ), 2'(DY), 2'(DX)}),
    .in_valid(enc_out_valid), .in_ready(enc_out_ready), .in_data(enc_out_data),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_flit(tx_flit)
  );

  // ---------------------------------------------------------------- network
  flit_t [NODES-1:0] inj_flit, ej_flit;
  logic  [NODES-1:0] inj_valid, ej_valid;
  logic  [NODES-1:0][NUM_VC-1:0] inj_ready, ej_ready;

  always_comb begin
    inj_flit     = pe_inj_flit;
    inj_valid    = pe_inj_valid;
    pe_inj_ready = inj_ready;
    inj_flit[SRC_NODE]     = tx_flit;
    inj_valid[SRC_NODE]    = tx_valid;
    pe_inj_ready[SRC_NODE] = '0;
  end
  assign tx_ready = inj_ready[SRC_NODE][0];

  mesh3d #(.X(X), .Y(Y), .Z(Z), .NUM_VC(NUM_VC), .FIFO_DEPTH(FIFO_DEPTH)) u_mesh (
    .clk(clk), .rst_n(rst_n),
    .inj_flit(inj_flit), .inj_valid(inj_valid), .inj_ready(inj_ready),
    .ej_flit(ej_flit), .ej_valid(ej_valid), .ej_ready(ej_ready)
  );

  // ---------------------------------------------------------------- R2 side
  logic  rx_valid, rx_ready, rx_last;
  byte_t rx_data;
  logic  dec_in_ready;

  always_comb begin
    pe_ej_flit  = ej_flit;
    pe_ej_valid = ej_valid;
    ej_ready    = pe_ej_ready;
    pe_ej_flit[DST_NODE]  = '0;
    pe_ej_valid[DST_NODE] = 1'b0;
    ej_ready[DST_NODE]    = {NUM_VC{rx_ready}};
  end

  ni_rx u_ni_rx (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ej_valid[DST_NODE]), .in_ready(rx_ready), .in_flit(ej_flit[DST_NODE]),
    .out_valid(rx_valid), .out_ready(dec_in_ready),
    .out_data(rx_data), .out_last(rx_last), .pkt_count(pkt_received)
  );

  etacit_decryptor #(.N_CHARS(N_CHARS), .KEY_BITS(KEY_BITS), .SEQ_LEN(SEQ_LEN)) u_dec (
    .clk(clk), .rst_n(rst_n), .key(key_r2), .j_seq(j_seq),
    .in_valid(rx_valid), .in_ready(dec_in_ready), .in_data(rx_data),
    .out_valid(pt_out_valid), .out_ready(pt_out_ready),
    .out_data(pt_out_data), .out_last(pt_out_last)
  );

  // the two routers must agree on the key whenever it is in use
  a_key_agree: assert property (@(posedge clk) disable iff (!rst_n)
    key_ready |-> key_match);

endmodule
