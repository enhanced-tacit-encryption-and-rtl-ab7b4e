// ni_rx: receive side of a network interface (de-packetizer).
//
// Takes the flits that the router ejects at its local port, drops each HEAD
// flit and passes the payload of BODY and TAIL flits on as a character
// stream; `out_last` marks the TAIL character. It also counts packets
// received. The packet format matches ni_tx and is this design's choice.
//
// Interface: `in_*` valid/ready flit stream from the router, `out_*`
// valid/ready byte stream. in_ready equals out_ready and does not depend on
// the flit, because the router's switch allocation looks at it. The virtual
// channel of the flits is ignored: the receiver expects one packet at a time.
// Timing: purely combinational forwarding; a HEAD flit is consumed in one
// cycle (while out_ready is high) without producing output.
module ni_rx
  import etacit_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  flit_t       in_flit,
  output logic        out_valid,
  input  logic        out_ready,
  output byte_t       out_data,
  output logic        out_last,
  output logic [15:0] pkt_count
);

  logic is_head;
  assign is_head   = (in_flit.ftype == FT_HEAD);
  assign out_valid = in_valid && !is_head;
  assign out_data  = in_flit.data;
  assign out_last  = (in_flit.ftype == FT_TAIL);
  assign in_ready  = out_ready;   // not a function of the flit: no loop through the router

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pkt_count <= '0;
    else if (in_valid && in_ready && out_last) pkt_count <= pkt_count + 1'b1;
  end

endmodule
