// tb_router3d: one router at (1,1,1), so that every one of the 7 output
// ports is a possible XYZ route, with 2 virtual channels. All 7 inputs send
// random packets (head with a random destination, 1..5 data flits, the last a
// TAIL) on random VCs, two senders per input so that both VCs of an input
// are busy at once, while every output VC applies random back-pressure. A
// scoreboard reassembles the packets per output VC and checks that each
// leaves whole on the output XYZ routing selects, in order per input VC and
// output. Also checks the idle-router latency (head leaves 2 edges after it
// is written) and counts VC-allocation contention, switch-allocation
// contention and flits of different packets interleaved on one output
// (virtual channels at work); each must occur.
module tb_router3d;
  import etacit_pkg::*;

  localparam int NP = 7, NV = 2, PKTS = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t [NP-1:0] in_flit, out_flit;
  logic  [NP-1:0] in_valid, out_valid;
  logic  [NP-1:0][NV-1:0] in_ready, out_ready;
  int checks = 0, failures = 0, contention = 0, sa_contention = 0, interleave = 0, cyc = 0;
  int delivered [NP];
  flit_t expq [NP*NV][NP][$];      // [input port*NV + input vc][output]
  flit_t cur  [NP][NV][$];         // packet being received per output VC
  int last_vc [NP];
  semaphore port_lock [NP];
  bit throttle = 1'b0;

  router3d #(.MY_X(1), .MY_Y(1), .MY_Z(1), .NUM_VC(NV), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .in_flit, .in_valid, .in_ready, .out_flit, .out_valid, .out_ready);

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_route(input bit [7:0] d);
    int x = d[1:0], y = d[3:2], z = d[5:4];
    if (x > 1) return 1; if (x < 1) return 2;
    if (y > 1) return 3; if (y < 1) return 4;
    if (z > 1) return 5; if (z < 1) return 6;
    return 0;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // contention monitors
  always @(negedge clk) begin
    for (int o = 0; o < NP; o++) begin
      if ($countones(dut.va_req[o]) > 1) contention++;
      if (dut.sa_grant[o]) begin
        int n;
        n = 0;
        for (int p = 0; p < NP; p++) if (dut.sa_in_req[p] && dut.sa_in_port[p] == port_t'(o)) n++;
        if (n > 1) sa_contention++;
      end
    end
  end

  // output sinks and scoreboard
  always @(negedge clk) begin
    for (int o = 0; o < NP; o++) begin
      for (int v = 0; v < NV; v++)
        out_ready[o][v] <= throttle ? 1'($urandom_range(0, 3) != 0) : 1'b1;
    end
  end
  always @(posedge clk) begin
    if (rst_n) for (int o = 0; o < NP; o++) begin
      if (out_valid[o]) begin
        int ov;
        ov = int'(out_flit[o].vc);
        checks++;
        if (ov >= NV || !out_ready[o][ov]) begin
          failures++; $display("FAIL output %0d sent on VC %0d without room", o, ov);
        end else begin
          if (last_vc[o] != ov && cur[o][last_vc[o]].size() != 0) interleave++;
          last_vc[o] = ov;
          cur[o][ov].push_back(out_flit[o]);
          if (out_flit[o].ftype == FT_TAIL) begin
            int src;
            src = int'(cur[o][ov][1].data[7:4]);
            checks++;
            if (cur[o][ov][0].ftype != FT_HEAD || ref_route(cur[o][ov][0].data) != o) begin
              failures++;
              $display("FAIL output %0d got a packet for dest %h", o, cur[o][ov][0].data);
            end
            foreach (cur[o][ov][k]) begin
              flit_t e, g;
              if (src >= NP*NV || expq[src][o].size() == 0) begin
                failures++; $display("FAIL output %0d: unexpected flit", o); break;
              end
              e = expq[src][o].pop_front();
              g = cur[o][ov][k];
              e.vc = '0; g.vc = '0;   // VC labels change hop by hop
              checks++;
              if (e != g) begin
                failures++;
                $display("FAIL output %0d from %0d flit %0d: got %h exp %h", o, src, k, g, e);
              end
            end
            delivered[o]++;
            cur[o][ov].delete();
          end
        end
      end
    end
  end

  // one flit per cycle per input link: the two senders of a port take turns
  task automatic send(input int p, input int vc, input bit [7:0] dest, input int nbody,
                      input bit gaps);
    for (int k = 0; k <= nbody; k++) begin
      flit_t f;
      f = '0;
      f.vc = VC_W'(vc);
      if (k == 0) begin f.ftype = FT_HEAD; f.data = dest; end
      else begin
        f.ftype = (k == nbody) ? FT_TAIL : FT_BODY;
        f.data  = {4'(p * NV + vc), 4'($urandom)};
      end
      expq[p*NV+vc][ref_route(dest)].push_back(f);
      forever begin
        @(negedge clk);
        if (in_ready[p][vc] && port_lock[p].try_get()) break;
      end
      in_flit[p]  = f;
      in_valid[p] = 1'b1;
      @(posedge clk);
      #1;
      in_valid[p] = 1'b0;
      port_lock[p].put();
      if (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  initial begin
    int t0;
    in_flit = '0; in_valid = '0; out_ready = '1;
    foreach (delivered[o]) begin delivered[o] = 0; last_vc[o] = 0; end
    foreach (port_lock[p]) port_lock[p] = new(1);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // idle latency: west input to east output
    fork
      send(2, 0, head_dest(3, 1, 1), 1, 1'b0);
    join_none
    @(posedge clk); #1;
    while (!in_valid[2]) begin @(posedge clk); #1; end
    t0 = cyc;                 // edge at which the head is written
    while (!out_valid[1]) begin @(negedge clk); end
    checks++;
    // t0 and cyc both read one past the edge index: a difference of 1 means
    // the head leaves at the second edge after the one that wrote it
    if (cyc - t0 != 1) begin
      failures++; $display("FAIL head latency %0d edges", cyc - t0);
    end
    repeat (10) @(posedge clk);
    // random traffic on all inputs with back-pressure
    throttle = 1'b1;
    for (int p = 0; p < NP * NV; p++) begin
      fork
        automatic int pp = p / NV;
        automatic int vv = p % NV;
        begin
          // one packet to every output first
          for (int n = 0; n < NP; n++) begin
            bit [7:0] to_port [NP];
            to_port = '{head_dest(1,1,1), head_dest(2,1,1), head_dest(0,2,2),
                        head_dest(1,3,0), head_dest(1,0,3), head_dest(1,1,2),
                        head_dest(1,1,0)};
            send(pp, vv, to_port[(pp + n + vv) % NP], $urandom_range(1, 5), 1'b1);
          end
          for (int n = 0; n < PKTS; n++) begin
            bit [7:0] d;
            // bias towards east so that inputs compete
            d = ($urandom_range(0, 2) == 0) ? head_dest(3, 0, 0)
                : head_dest($urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 3));
            send(pp, vv, d, $urandom_range(1, 5), 1'b1);
          end
        end
      join_none
    end
    wait fork;
    repeat (200) @(posedge clk);
    for (int o = 0; o < NP; o++) begin
      checks++;
      if (delivered[o] == 0) begin failures++; $display("FAIL nothing delivered at output %0d", o); end
      for (int v = 0; v < NV; v++) begin
        checks++;
        if (cur[o][v].size() != 0) begin failures++; $display("FAIL partial packet at output %0d", o); end
      end
      for (int i = 0; i < NP * NV; i++) begin
        checks++;
        if (expq[i][o].size() != 0) begin
          failures++; $display("FAIL %0d flits from %0d never left output %0d", expq[i][o].size(), i, o);
        end
      end
    end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no VA contention exercised"); end
    checks++;
    if (sa_contention == 0) begin failures++; $display("FAIL no SA contention exercised"); end
    checks++;
    if (interleave == 0) begin failures++; $display("FAIL no VC interleaving on an output"); end
    $display("va_contention=%0d sa_contention=%0d vc_interleave=%0d", contention, sa_contention, interleave);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
