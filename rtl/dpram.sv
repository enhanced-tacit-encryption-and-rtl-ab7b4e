// dpram: simple dual-port RAM, one write port and one read port, one clock.
//
// Used as the block buffer of the E-TACIT encryptor and decryptor: one side
// writes characters in arrival order while the other reads them in shuffled
// (or plain) order. Port A writes `wdata` to `waddr` when `we` is high. Port B
// is a registered read: when `re` is high, `rdata` shows the word at `raddr`
// one cycle later; when `re` is low `rdata` holds its value, which lets a
// stalled pipeline keep its read data. A read of the address being written in
// the same cycle returns the old word. The contents are not reset.
module dpram #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
