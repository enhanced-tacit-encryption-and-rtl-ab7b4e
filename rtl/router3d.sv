// router3d: 7-port virtual-channel wormhole router of the 3-D mesh.
//
// The ports are local (processing element), east/west (x), north/south (y)
// and up/down (z, the vertical through-silicon-via links), numbered as in
// etacit_pkg::port_t. Every input port has NUM_VC virtual channels (VCs),
// each with its own FIFO. A packet is a HEAD flit carrying the destination
// {z,y,x}, BODY flits and a closing TAIL flit, all on one VC of a link.
//
//  * Routing computation (RC): dimension-order XYZ routing on the HEAD flit:
//    east/west until x matches, then north/south, then up/down, then local.
//  * Virtual-channel allocation (VA): an input VC whose HEAD flit is at the
//    front asks for a free VC of its output port. Each output port grants one
//    request per cycle, round-robin over the P*NUM_VC input VCs with the iSLIP
//    pointer rule (the pointer moves one past the granted input VC), and
//    hands out its lowest-numbered free VC. The output VC stays allocated
//    until the packet's TAIL flit leaves.
//  * Switch allocation (SA): one iteration of iSLIP. Each input port picks,
//    round-robin, one of its VCs that holds an output VC, has a flit and sees
//    room downstream (request/accept side); each output port then grants one
//    of the requesting input ports round-robin. Both pointers move one past
//    the winner only when the grant is made, as in iSLIP.
//  * Switch traversal (ST): the crossbar sends the granted flit, relabelled
//    with its output VC, in the same cycle.
// Because a blocked packet only holds its own VC, packets on other VCs of the
// same input can pass it: this is what removes head-of-line blocking.
//
// Interface: per port a flit channel in each direction with a per-VC ready
// vector. in_ready[p][v] is the registered not-full flag of input FIFO (p,v);
// a flit may be sent on VC v only while the receiver's ready[v] is high.
// Timing: a head flit written into a FIFO at edge n gets its output VC at
// edge n+1 and crosses the switch at edge n+2; body flits then follow one per
// cycle when they win switch allocation.
module router3d
  import etacit_pkg::*;
#(
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter int unsigned MY_Z       = 0,
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  flit_t [NPORTS-1:0]             in_flit,
  input  logic  [NPORTS-1:0]             in_valid,
  output logic  [NPORTS-1:0][NUM_VC-1:0] in_ready,
  output flit_t [NPORTS-1:0]             out_flit,
  output logic  [NPORTS-1:0]             out_valid,
  input  logic  [NPORTS-1:0][NUM_VC-1:0] out_ready
);

  localparam int unsigned NIV = NPORTS * NUM_VC;   // input VCs

  initial assert (NUM_VC >= 1 && NUM_VC <= (1 << VC_W)) else $error("NUM_VC out of range");

  typedef logic [VC_W-1:0] vc_t;                   // VC label on a link
  localparam int unsigned VI_W = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;
  typedef logic [VI_W-1:0] vi_t;                   // VC index inside the router

  flit_t [NPORTS-1:0][NUM_VC-1:0] head;
  logic  [NPORTS-1:0][NUM_VC-1:0] fvalid, fpop;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      flit_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
        .clk   (clk),
        .rst_n (rst_n),
        .push  (in_valid[p] && in_flit[p].vc == vc_t'(v)),
        .din   (in_flit[p]),
        .ready (in_ready[p][v]),
        .pop   (fpop[p][v]),
        .valid (fvalid[p][v]),
        .head  (head[p][v])
      );
    end
  end

  // ---- routing computation (XYZ)
  function automatic port_t xyz_route(input byte_t dest);
    int unsigned dx, dy, dz;
    dx = 32'(dest[1:0]);
    dy = 32'(dest[3:2]);
    dz = 32'(dest[5:4]);
    if (dx > MY_X)      return P_EAST;
    else if (dx < MY_X) return P_WEST;
    else if (dy > MY_Y) return P_NORTH;
    else if (dy < MY_Y) return P_SOUTH;
    else if (dz > MY_Z) return P_UP;
    else if (dz < MY_Z) return P_DOWN;
    else                return P_LOCAL;
  endfunction

  // ---- per input VC and per output VC state
  logic  [NPORTS-1:0][NUM_VC-1:0] ivc_alloc;    // input VC holds an output VC
  port_t [NPORTS-1:0][NUM_VC-1:0] ivc_port;     // ... on this output port
  vi_t   [NPORTS-1:0][NUM_VC-1:0] ivc_ovc;      // ... and this output VC
  logic  [NPORTS-1:0][NUM_VC-1:0] ovc_busy;     // output VC allocated

  // ---- VC allocation
  logic [NPORTS-1:0][NIV-1:0] va_req;           // va_req[o][p*NUM_VC+v]
  logic [NPORTS-1:0]          va_grant;
  int unsigned                va_win  [NPORTS];
  vi_t                        va_free [NPORTS];
  logic [NPORTS-1:0]          va_has_free;
  int unsigned                va_ptr  [NPORTS];

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      for (int p = 0; p < NPORTS; p++)
        for (int v = 0; v < NUM_VC; v++)
          va_req[o][p*NUM_VC+v] = fvalid[p][v] && !ivc_alloc[p][v] &&
                                  (head[p][v].ftype == FT_HEAD) &&
                                  (xyz_route(head[p][v].data) == port_t'(o));
      va_has_free[o] = 1'b0;
      va_free[o]     = '0;
      for (int w = NUM_VC - 1; w >= 0; w--)
        if (!ovc_busy[o][w]) begin
          va_has_free[o] = 1'b1;
          va_free[o]     = vi_t'(w);
        end
      va_grant[o] = 1'b0;
      va_win[o]   = 0;
      for (int k = NIV - 1; k >= 0; k--) begin
        int unsigned idx;
        idx = (va_ptr[o] + 32'(k)) % NIV;
        if (va_has_free[o] && va_req[o][idx]) begin
          va_grant[o] = 1'b1;
          va_win[o]   = idx;
        end
      end
    end
  end

  // ---- switch allocation, stage 1: one VC per input port
  logic [NPORTS-1:0]        sa_in_req;
  vi_t                      sa_in_vc  [NPORTS];
  int unsigned              sa_in_ptr [NPORTS];
  port_t [NPORTS-1:0]       sa_in_port;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      sa_in_req[p]  = 1'b0;
      sa_in_vc[p]   = '0;
      sa_in_port[p] = P_LOCAL;
      for (int k = NUM_VC - 1; k >= 0; k--) begin
        int unsigned v;
        v = (sa_in_ptr[p] + 32'(k)) % NUM_VC;
        if (ivc_alloc[p][v] && fvalid[p][v] &&
            out_ready[ivc_port[p][v]][ivc_ovc[p][v]]) begin
          sa_in_req[p]  = 1'b1;
          sa_in_vc[p]   = vi_t'(v);
          sa_in_port[p] = ivc_port[p][v];
        end
      end
    end
  end

  // ---- switch allocation, stage 2: one input port per output port
  logic [NPORTS-1:0]  sa_grant;
  port_t [NPORTS-1:0] sa_win;
  int unsigned        sa_out_ptr [NPORTS];
  logic [NPORTS-1:0]  in_won;

  always_comb begin
    in_won = '0;
    for (int o = 0; o < NPORTS; o++) begin
      sa_grant[o] = 1'b0;
      sa_win[o]   = P_LOCAL;
      for (int k = NPORTS - 1; k >= 0; k--) begin
        int unsigned p;
        p = (sa_out_ptr[o] + 32'(k)) % NPORTS;
        if (sa_in_req[p] && sa_in_port[p] == port_t'(o)) begin
          sa_grant[o] = 1'b1;
          sa_win[o]   = port_t'(p);
        end
      end
      if (sa_grant[o]) in_won[sa_win[o]] = 1'b1;
    end
  end

  // ---- switch traversal (crossbar) and FIFO pops
  always_comb begin
    fpop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = sa_grant[o];
      out_flit[o]  = head[sa_win[o]][sa_in_vc[sa_win[o]]];
      out_flit[o].vc = vc_t'(ivc_ovc[sa_win[o]][sa_in_vc[sa_win[o]]]);
      if (sa_grant[o]) fpop[sa_win[o]][sa_in_vc[sa_win[o]]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ivc_alloc <= '0;
      ivc_port  <= '0;
      ivc_ovc   <= '0;
      ovc_busy  <= '0;
      for (int i = 0; i < NPORTS; i++) begin
        va_ptr[i]     <= 0;
        sa_in_ptr[i]  <= 0;
        sa_out_ptr[i] <= 0;
      end
    end else begin
      // release on TAIL traversal
      for (int o = 0; o < NPORTS; o++) begin
        if (sa_grant[o] && out_flit[o].ftype == FT_TAIL) begin
          ivc_alloc[sa_win[o]][sa_in_vc[sa_win[o]]] <= 1'b0;
          ovc_busy[o][ivc_ovc[sa_win[o]][sa_in_vc[sa_win[o]]]] <= 1'b0;
        end
      end
      // VC allocation
      for (int o = 0; o < NPORTS; o++) begin
        if (va_grant[o]) begin
          ivc_alloc[va_win[o] / NUM_VC][va_win[o] % NUM_VC] <= 1'b1;
          ivc_port [va_win[o] / NUM_VC][va_win[o] % NUM_VC] <= port_t'(o);
          ivc_ovc  [va_win[o] / NUM_VC][va_win[o] % NUM_VC] <= va_free[o];
          ovc_busy[o][va_free[o]]                            <= 1'b1;
          va_ptr[o] <= (va_win[o] + 1) % NIV;
        end
      end
      // iSLIP pointer updates for switch allocation
      for (int o = 0; o < NPORTS; o++)
        if (sa_grant[o]) sa_out_ptr[o] <= (32'(sa_win[o]) + 1) % NPORTS;
      for (int p = 0; p < NPORTS; p++)
        if (in_won[p]) sa_in_ptr[p] <= (32'(sa_in_vc[p]) + 1) % NUM_VC;
    end
  end

  // a flit is only ever sent where the receiving VC has room
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_room: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] |-> out_ready[o][ivc_ovc[sa_win[o]][sa_in_vc[sa_win[o]]]]);
  end

endmodule
