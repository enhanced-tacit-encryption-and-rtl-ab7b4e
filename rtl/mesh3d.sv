// mesh3d: X x Y x Z mesh of 3-D routers (2 x 4 x 2 = 16 routers by default).
//
// Router (x,y,z) has node number n = x + X*(y + Y*z). Its east port connects
// to the west port of (x+1,y,z), north to south of (x,y+1,z) (the planar
// 2-D links), and up to down of (x,y,z+1) (the vertical TSV links between the
// two layers). Ports on the edge of the mesh are left unconnected: their
// inputs never carry a flit and their outputs always see room, which is safe
// because XYZ routing never sends a packet out of the mesh. The local port
// of every router is brought out, indexed by node number.
//
// Interface: per node a flit channel into the network (inj_*) and out of it
// (ej_*), each with a per-virtual-channel ready vector: a flit may be put on
// VC v only while ready[v] is high. Timing: each hop adds two cycles to a
// head flit (FIFO write and VC allocation, then switch allocation and
// traversal); body flits stream behind it.
module mesh3d
  import etacit_pkg::*;
#(
  parameter int unsigned X          = 2,
  parameter int unsigned Y          = 4,
  parameter int unsigned Z          = 2,
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NODES     = X * Y * Z
) (
  input  logic               clk,
  input  logic               rst_n,
  input  flit_t [NODES-1:0]  inj_flit,
  input  logic  [NODES-1:0]  inj_valid,
  output logic  [NODES-1:0][NUM_VC-1:0] inj_ready,
  output flit_t [NODES-1:0]  ej_flit,
  output logic  [NODES-1:0]  ej_valid,
  input  logic  [NODES-1:0][NUM_VC-1:0] ej_ready
);

  initial assert (X <= 4 && Y <= 4 && Z <= 4) else $error("mesh dimension above 4");

  flit_t [NODES-1:0][NPORTS-1:0] rin_flit, rout_flit;
  logic  [NODES-1:0][NPORTS-1:0] rin_valid, rout_valid;
  logic  [NODES-1:0][NPORTS-1:0][NUM_VC-1:0] rin_ready, rout_ready;

  function automatic int unsigned node(input int unsigned x, input int unsigned y,
                                       input int unsigned z);
    return x + X * (y + Y * z);
  endfunction

  for (genvar z = 0; z < Z; z++) begin : g_z
    for (genvar y = 0; y < Y; y++) begin : g_y
      for (genvar x = 0; x < X; x++) begin : g_x
        localparam int unsigned N = x + X * (y + Y * z);

        router3d #(.MY_X(x), .MY_Y(y), .MY_Z(z), .NUM_VC(NUM_VC),
                   .FIFO_DEPTH(FIFO_DEPTH)) u_router (
          .clk       (clk),
          .rst_n     (rst_n),
          .in_flit   (rin_flit[N]),
          .in_valid  (rin_valid[N]),
          .in_ready  (rin_ready[N]),
          .out_flit  (rout_flit[N]),
          .out_valid (rout_valid[N]),
          .out_ready (rout_ready[N])
        );

        // local port
        assign rin_flit[N][P_LOCAL]   = inj_flit[N];
        assign rin_valid[N][P_LOCAL]  = inj_valid[N];
        assign inj_ready[N]           = rin_ready[N][P_LOCAL];
        assign ej_flit[N]             = rout_flit[N][P_LOCAL];
        assign ej_valid[N]            = rout_valid[N][P_LOCAL];
        assign rout_ready[N][P_LOCAL] = ej_ready[N];

        // input side of each mesh port: from the neighbour's opposite output
        if (x + 1 < X) begin : g_e
          assign rin_flit[N][P_EAST]    = rout_flit[node(x+1, y, z)][P_WEST];
          assign rin_valid[N][P_EAST]   = rout_valid[node(x+1, y, z)][P_WEST];
          assign rout_ready[N][P_EAST]  = rin_ready[node(x+1, y, z)][P_WEST];
        end else begin : g_ne
          assign rin_flit[N][P_EAST]    = '0;
          assign rin_valid[N][P_EAST]   = 1'b0;
          assign rout_ready[N][P_EAST]  = '1;
        end
        if (x > 0) begin : g_w
          assign rin_flit[N][P_WEST]    = rout_flit[node(x-1, y, z)][P_EAST];
          assign rin_valid[N][P_WEST]   = rout_valid[node(x-1, y, z)][P_EAST];
          assign rout_ready[N][P_WEST]  = rin_ready[node(x-1, y, z)][P_EAST];
        end else begin : g_nw
          assign rin_flit[N][P_WEST]    = '0;
          assign rin_valid[N][P_WEST]   = 1'b0;
          assign rout_ready[N][P_WEST]  = '1;
        end
        if (y + 1 < Y) begin : g_n
          assign rin_flit[N][P_NORTH]   = rout_flit[node(x, y+1, z)][P_SOUTH];
          assign rin_valid[N][P_NORTH]  = rout_valid[node(x, y+1, z)][P_SOUTH];
          assign rout_ready[N][P_NORTH] = rin_ready[node(x, y+1, z)][P_SOUTH];
        end else begin : g_nn
          assign rin_flit[N][P_NORTH]   = '0;
          assign rin_valid[N][P_NORTH]  = 1'b0;
          assign rout_ready[N][P_NORTH] = '1;
        end
        if (y > 0) begin : g_s
          assign rin_flit[N][P_SOUTH]   = rout_flit[node(x, y-1, z)][P_NORTH];
          assign rin_valid[N][P_SOUTH]  = rout_valid[node(x, y-1, z)][P_NORTH];
          assign rout_ready[N][P_SOUTH] = rin_ready[node(x, y-1, z)][P_NORTH];
        end else begin : g_ns
          assign rin_flit[N][P_SOUTH]   = '0;
          assign rin_valid[N][P_SOUTH]  = 1'b0;
          assign rout_ready[N][P_SOUTH] = '1;
        end
        if (z + 1 < Z) begin : g_u
          assign rin_flit[N][P_UP]      = rout_flit[node(x, y, z+1)][P_DOWN];
          assign rin_valid[N][P_UP]     = rout_valid[node(x, y, z+1)][P_DOWN];
          assign rout_ready[N][P_UP]    = rin_ready[node(x, y, z+1)][P_DOWN];
        end else begin : g_nu
          assign rin_flit[N][P_UP]      = '0;
          assign rin_valid[N][P_UP]     = 1'b0;
          assign rout_ready[N][P_UP]    = '1;
        end
        if (z > 0) begin : g_d
          assign rin_flit[N][P_DOWN]    = rout_flit[node(x, y, z-1)][P_UP];
          assign rin_valid[N][P_DOWN]   = rout_valid[node(x, y, z-1)][P_UP];
          assign rout_ready[N][P_DOWN]  = rin_ready[node(x, y, z-1)][P_UP];
        end else begin : g_nd
          assign rin_flit[N][P_DOWN]    = '0;
          assign rin_valid[N][P_DOWN]   = 1'b0;
          assign rout_ready[N][P_DOWN]  = '1;
        end
      end
    end
  end

endmodule
