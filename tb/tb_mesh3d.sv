// tb_mesh3d: the full 2x4x2 mesh (16 routers, two layers joined by TSV
// links). First a single packet from node 0 to node 15 on an idle network
// checks the head latency (2 edges per router, 6 routers on the XYZ path).
// Then every node sends random packets to random other nodes on both
// virtual channels (two senders per node sharing the injection link) while
// every local output VC applies back-pressure; a scoreboard reassembles
// packets per ejection VC and checks that each arrives whole at its
// destination node, in order per source/injection-VC/destination, and counts
// packets that had to cross between the layers.
module tb_mesh3d;
  import etacit_pkg::*;

  localparam int X = 2, Y = 4, Z = 2, NN = X * Y * Z, NV = 2, PKTS = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t [NN-1:0] inj_flit, ej_flit;
  logic  [NN-1:0] inj_valid, ej_valid;
  logic  [NN-1:0][NV-1:0] inj_ready, ej_ready;
  int checks = 0, failures = 0, cyc = 0, layer_cross = 0, received = 0, sent = 0;
  flit_t expq [NN*NV][NN][$];     // [source*NV + injection vc][destination]
  flit_t cur  [NN][NV][$];
  semaphore port_lock [NN];
  bit throttle = 1'b0;

  mesh3d #(.X(X), .Y(Y), .Z(Z), .NUM_VC(NV), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .inj_flit, .inj_valid, .inj_ready, .ej_flit, .ej_valid, .ej_ready);

  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit [7:0] dest_of(input int n);
    return head_dest(n % X, (n / X) % Y, n / (X * Y));
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int n = 0; n < NN; n++)
      for (int v = 0; v < NV; v++)
        ej_ready[n][v] <= throttle ? 1'($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n) for (int n = 0; n < NN; n++) begin
      if (ej_valid[n]) begin
        int ov;
        ov = int'(ej_flit[n].vc);
        if (ov >= NV || !ej_ready[n][ov]) begin
          checks++; failures++; $display("FAIL node %0d ejected on VC %0d without room", n, ov);
        end else begin
          cur[n][ov].push_back(ej_flit[n]);
          if (ej_flit[n].ftype == FT_TAIL) begin
            int src;
            src = int'(cur[n][ov][1].data[7:4]) * NV + int'(cur[n][ov][1].data[0]);
            checks++;
            if (cur[n][ov][0].data != dest_of(n)) begin
              failures++; $display("FAIL node %0d got packet for %h", n, cur[n][ov][0].data);
            end
            foreach (cur[n][ov][k]) begin
              flit_t e, g;
              if (expq[src][n].size() == 0) begin
                failures++; $display("FAIL node %0d: unexpected flit from %0d", n, src); break;
              end
              e = expq[src][n].pop_front();
              g = cur[n][ov][k];
              e.vc = '0; g.vc = '0;
              checks++;
              if (e != g) begin
                failures++; $display("FAIL node %0d from %0d flit %0d: got %h exp %h", n, src, k, g, e);
              end
            end
            if ((src / NV / (X * Y)) != (n / (X * Y))) layer_cross++;
            received++;
            cur[n][ov].delete();
          end
        end
      end
    end
  end

  task automatic send(input int s, input int vc, input int d, input int nbody);
    for (int k = 0; k <= nbody; k++) begin
      flit_t f;
      f = '0;
      f.vc = VC_W'(vc);
      if (k == 0) begin f.ftype = FT_HEAD; f.data = dest_of(d); end
      else begin
        f.ftype = (k == nbody) ? FT_TAIL : FT_BODY;
        f.data  = {4'(s), 3'($urandom), 1'(vc)};
      end
      expq[s*NV+vc][d].push_back(f);
      forever begin
        @(negedge clk);
        if (inj_ready[s][vc] && port_lock[s].try_get()) break;
      end
      inj_flit[s]  = f;
      inj_valid[s] = 1'b1;
      @(posedge clk);
      #1;
      inj_valid[s] = 1'b0;
      port_lock[s].put();
    end
    sent++;
  endtask

  initial begin
    int t0;
    inj_flit = '0; inj_valid = '0; ej_ready = '1;
    foreach (port_lock[n]) port_lock[n] = new(1);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    fork send(0, 0, NN - 1, 2); join_none
    @(posedge clk); #1;
    while (!inj_valid[0]) begin @(posedge clk); #1; end
    t0 = cyc;
    while (!ej_valid[NN-1]) @(negedge clk);
    checks++;
    // 6 routers x 2 edges; both counters read one past their edge index
    if (cyc - t0 != 11) begin failures++; $display("FAIL 0->15 head latency %0d", cyc - t0 + 1); end
    repeat (20) @(posedge clk);
    throttle = 1'b1;
    for (int s = 0; s < NN * NV; s++) begin
      fork
        automatic int ss = s / NV;
        automatic int vv = s % NV;
        for (int n = 0; n < PKTS; n++) begin
          int d;
          d = $urandom_range(0, NN - 2);
          if (d >= ss) d++;
          send(ss, vv, d, $urandom_range(1, 6));
        end
      join_none
    end
    wait fork;
    repeat (300) @(posedge clk);
    checks++;
    if (received != sent) begin failures++; $display("FAIL sent %0d received %0d", sent, received); end
    for (int s = 0; s < NN * NV; s++)
      for (int d = 0; d < NN; d++) begin
        checks++;
        if (expq[s][d].size() != 0) begin failures++; $display("FAIL %0d->%0d lost flits", s, d); end
      end
    checks++;
    if (layer_cross == 0) begin failures++; $display("FAIL no packet crossed layers"); end
    $display("packets=%0d layer_crossings=%0d", received, layer_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
