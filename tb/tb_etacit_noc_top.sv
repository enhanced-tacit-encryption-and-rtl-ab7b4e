// tb_etacit_noc_top: end-to-end test of the secured 3-D NoC at its default
// size (2x4x2 mesh, 1024-bit key, 128-character blocks, R1 = node 0,
// R2 = node 15, which lies in the other layer at the far corner).
//
// Two sessions are run. In each, the random sequences J and K are drawn and
// exchanged, both routers derive the key (checked word by word against the
// reference derivation, and against each other), then two 1024-bit blocks of
// random text are sent. The cipher flits entering the network are checked
// against the reference E-TACIT encryption, and the text delivered at R2
// must equal the text sent at R1. Meanwhile processing elements at other
// nodes send packets across the secure packet's path, and the receiver
// applies back-pressure. Counted mechanisms, each of which must occur: key
// sessions, gated-clock activity, shuffle with a non-zero mask, layer
// crossing through a TSV link, contention at a router output shared with
// cross traffic (for a virtual channel or for the switch), cross traffic
// delivered, and receiver stalls. The cross traffic is injected on VC 1.
// The latency of each block, from its first character in to its last
// character out, is printed and checked against the serialised pipeline
// (3N + 17 cycles with no interference).
module tb_etacit_noc_top;
  import etacit_pkg::*;
  import etacit_ref_pkg::*;

  localparam int NN = 16, N = 128, KB = 1024, L = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic session_start = 1'b0, key_ready, key_match;
  logic pt_in_valid = 1'b0, pt_in_ready, pt_out_valid, pt_out_ready = 1'b1, pt_out_last;
  byte_t pt_in_data = '0, pt_out_data;
  logic [15:0] pkt_received;
  flit_t [NN-1:0] pe_inj_flit, pe_ej_flit;
  logic  [NN-1:0] pe_inj_valid, pe_ej_valid;
  logic  [NN-1:0][1:0] pe_inj_ready, pe_ej_ready;

  etacit_noc_top dut (.*);

  int checks = 0, failures = 0;
  int n_sessions = 0, n_gated = 0, n_shuffle = 0, n_tsv = 0, n_contention = 0,
      n_stall = 0, n_cross = 0;
  bit throttle = 1'b0;
  bit [7:0] sent_q [$];
  bit [7:0] blk [N];
  int blk_no = 0;
  int cyc = 0, t_first = 0;
  int lat [$];
  int tx_idx = 0;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dut.u_keygen_r1.gclk) n_gated++;

  // the secure packet climbs from layer 0 to layer 1 at node 7 (x=1,y=3)
  always @(posedge clk)
    if (dut.u_mesh.g_z[0].g_y[3].g_x[1].u_router.out_valid[P_UP] &&
        dut.u_mesh.g_z[0].g_y[3].g_x[1].u_router.out_ready[P_UP][
            dut.u_mesh.g_z[0].g_y[3].g_x[1].u_router.out_flit[P_UP].vc]) n_tsv++;

  // contention at the north output of node 3 (x=1,y=1), on the secure path
  always @(negedge clk) begin
    int n;
    n = 0;
    for (int p = 0; p < NPORTS; p++)
      if (dut.u_mesh.g_z[0].g_y[1].g_x[1].u_router.sa_in_req[p] && dut.u_mesh.g_z[0].g_y[1].g_x[1].u_router.sa_in_port[p] == P_NORTH) n++;
    if (n > 1 || $countones(dut.u_mesh.g_z[0].g_y[1].g_x[1].u_router.va_req[P_NORTH]) > 1) n_contention++;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // block latency: first plaintext character accepted at R1 to last one
  // released at R2
  always @(posedge clk)
    if (rst_n && pt_out_valid && pt_out_ready && pt_out_last) lat.push_back(cyc - t_first);

  // receiver back-pressure
  always @(negedge clk) pt_out_ready <= throttle ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (pt_out_valid && !pt_out_ready) n_stall++;

  // cipher on the wire: body flits injected at node 0
  always @(posedge clk) begin
    if (rst_n && dut.tx_valid && dut.tx_ready && dut.tx_flit.ftype != FT_HEAD) begin
      bit [7:0] e, j, kb;
      logic [6:0] src;
      src = 7'(tx_idx) ^ dut.key_r1[6:0];
      kb  = dut.key_r1[(tx_idx % (KB/8))*8 +: 8];
      j   = dut.j_seq[tx_idx % L];
      e   = ref_enc(blk[src], kb, j);
      checks++;
      if (dut.tx_flit.data !== e) begin
        failures++; $display("FAIL cipher char %0d: got %h exp %h", tx_idx, dut.tx_flit.data, e);
      end
      tx_idx = (tx_idx + 1) % N;
    end
  end

  // delivered text
  always @(posedge clk) begin
    if (rst_n && pt_out_valid && pt_out_ready) begin
      bit [7:0] e;
      checks++;
      if (sent_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = sent_q.pop_front();
        if (pt_out_data !== e || pt_out_last !== (sent_q.size() % N == 0)) begin
          failures++; $display("FAIL text: got %h exp %h", pt_out_data, e);
        end
      end
    end
  end

  // cross traffic on VC 1: node 1 -> node 7 and node 3 -> node 5 share the
  // x=1 column with R1's packet
  task automatic pe_send(input int s, input int d, input int nbody);
    for (int k = 0; k <= nbody; k++) begin
      flit_t f;
      f = '0;
      f.vc = VC_W'(1);
      if (k == 0) begin f.ftype = FT_HEAD; f.data = head_dest(d % 2, (d / 2) % 4, d / 8); end
      else begin f.ftype = (k == nbody) ? FT_TAIL : FT_BODY; f.data = 8'($urandom); end
      @(negedge clk);
      pe_inj_flit[s]  = f;
      pe_inj_valid[s] = 1'b1;
      while (!pe_inj_ready[s][1]) @(negedge clk);
      @(posedge clk);
      #1;
    end
    pe_inj_valid[s] = 1'b0;
  endtask

  always @(posedge clk) if (rst_n && pe_ej_valid[7] && pe_ej_ready[7][pe_ej_flit[7].vc] && pe_ej_flit[7].ftype == FT_TAIL) n_cross++;
  always @(posedge clk) if (rst_n && pe_ej_valid[5] && pe_ej_ready[5][pe_ej_flit[5].vc] && pe_ej_flit[5].ftype == FT_TAIL) n_cross++;

  task automatic run_session();
    @(negedge clk);
    session_start = 1'b1;
    @(negedge clk);
    session_start = 1'b0;
    #1;
    checks++;
    if (key_ready) begin failures++; $display("FAIL key_ready during set-up"); end
    wait (key_ready);
    @(negedge clk);
    n_sessions++;
    checks++;
    if (!key_match) begin failures++; $display("FAIL keys of R1 and R2 differ"); end
    begin
      bit [7:0] jr[], kr[];
      jr = new[L]; kr = new[L];
      for (int i = 0; i < L; i++) begin jr[i] = dut.j_seq[i]; kr[i] = dut.k_seq[i]; end
      for (int w = 0; w < KB / 32; w++) begin
        checks++;
        if (dut.key_r1[w*32 +: 32] !== ref_key_word(jr, kr, w)) begin
          failures++; $display("FAIL key word %0d", w);
        end
      end
    end
    if (dut.key_r1[6:0] != 0) n_shuffle++;
  endtask

  task automatic send_block();
    for (int i = 0; i < N; i++) blk[i] = 8'($urandom_range(32, 126));
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      pt_in_valid = 1'b1;
      pt_in_data  = blk[i];
      sent_q.push_back(blk[i]);
      #1;
      while (!pt_in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1;
      if (i == 0) t_first = cyc - 1;   // index of the accepting edge
    end
    pt_in_valid = 1'b0;
    blk_no++;
  endtask

  initial begin
    pe_inj_flit = '0; pe_inj_valid = '0; pe_ej_ready = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int s = 0; s < 2; s++) begin
      run_session();
      throttle = (s == 1);
      for (int b = 0; b < 2; b++) begin
        fork
          send_block();
          begin
            repeat (N + 4) @(posedge clk);  // cross traffic while the packet is in flight
            for (int k = 0; k < 6; k++) pe_send(1, 7, 20);
          end
          begin
            repeat (N + 4) @(posedge clk);
            for (int k = 0; k < 6; k++) pe_send(3, 5, 20);
          end
        join
        wait (sent_q.size() == 0);
        repeat (20) @(posedge clk);
      end
    end
    repeat (100) @(posedge clk);
    checks++;
    if (pkt_received != 16'(blk_no)) begin failures++; $display("FAIL %0d packets received", pkt_received); end
    checks++; if (n_sessions != 2)  begin failures++; $display("FAIL sessions"); end
    checks++; if (n_gated == 0)     begin failures++; $display("FAIL gated clock never ran"); end
    checks++; if (n_shuffle == 0)   begin failures++; $display("FAIL shuffle mask always zero"); end
    checks++; if (n_tsv == 0)       begin failures++; $display("FAIL no TSV crossing"); end
    checks++; if (n_contention == 0) begin failures++; $display("FAIL no contention"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no receiver stall"); end
    checks++; if (n_cross == 0)     begin failures++; $display("FAIL no cross traffic delivered"); end
    $display("sessions=%0d gated_edges=%0d shuffles=%0d tsv_flits=%0d contention=%0d stalls=%0d cross_pkts=%0d",
             n_sessions, n_gated, n_shuffle, n_tsv, n_contention, n_stall, n_cross);
    // A block is loaded, streamed and released one after the other (each
    // end holds one block), so it takes 3N cycles plus 17 of pipeline,
    // head flit and six router hops. Cross traffic shares the switch on the
    // first two blocks (2 x 6 packets of 21 flits can delay it by 252
    // cycles at most); the later two blocks see receiver back-pressure.
    checks++;
    if (lat.size() != blk_no) begin failures++; $display("FAIL %0d block latencies", lat.size()); end
    foreach (lat[b]) begin
      $display("block %0d: %0d cycles from first character in to last character out", b, lat[b]);
      checks++;
      if (lat[b] < 3 * N + 17 || (b < 2 && lat[b] > 3 * N + 17 + 2 * 6 * 21)) begin
        failures++; $display("FAIL block %0d latency %0d", b, lat[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
