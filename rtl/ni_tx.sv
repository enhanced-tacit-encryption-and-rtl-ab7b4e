// ni_tx: transmit side of a network interface (packetizer).
//
// Turns a stream of cipher characters into packets of the 3-D network: a
// HEAD flit carrying the destination coordinates, then one flit per
// character, the last of the N_CHARS characters sent as a TAIL flit. The
// packet format is this design's choice; the network interface is named by
// the architecture but not described.
//
// Interface: `in_*` valid/ready byte stream; `dest` = {z,y,x} coordinates
// (2 bits each) sampled when a packet starts; `out_*` valid/ready flit
// stream into the router's local port; all flits use virtual channel VC and
// `out_ready` must be the router's ready for that VC. Timing: the head flit costs one cycle,
// after which each character is forwarded combinationally (in_ready follows
// out_ready), so a packet of N_CHARS characters takes N_CHARS+1 flit cycles.
module ni_tx
  import etacit_pkg::*;
#(
  parameter int unsigned N_CHARS = 128,
  parameter int unsigned VC      = 0,
  localparam int unsigned CW     = $clog2(N_CHARS + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] dest,
  input  logic       in_valid,
  output logic       in_ready,
  input  byte_t      in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output flit_t      out_flit
);

  typedef enum logic {T_HEAD, T_BODY} tstate_t;
  tstate_t       state;
  logic [CW-1:0] cnt;

  always_comb begin
    if (state == T_HEAD) begin
      out_valid      = in_valid;          // a packet starts with its first character
      out_flit.ftype = FT_HEAD;
      out_flit.vc    = VC_W'(VC);
      out_flit.data  = {2'b00, dest};
      in_ready       = 1'b0;
    end else begin
      out_valid      = in_valid;
      out_flit.ftype = (cnt == CW'(N_CHARS - 1)) ? FT_TAIL : FT_BODY;
      out_flit.vc    = VC_W'(VC);
      out_flit.data  = in_data;
      in_ready       = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_HEAD;
      cnt   <= '0;
    end else if (out_valid && out_ready) begin
      if (state == T_HEAD) begin
        state <= T_BODY;
        cnt   <= '0;
      end else if (cnt == CW'(N_CHARS - 1)) begin
        state <= T_HEAD;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
