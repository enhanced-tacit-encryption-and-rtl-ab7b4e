// tb_dpram: random writes and reads against a model array; checks the
// one-cycle read latency, read hold when re is low, and read-old-data when
// reading the address being written.
module tb_dpram;
  localparam int DEPTH = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0, re = 1'b0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  dpram #(.DW(8), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_q, held;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      we <= 1'b1; waddr <= 5'(i); wdata <= 8'($urandom); 
      @(posedge clk);
      model[i] = wdata;
    end
    we <= 1'b0;
    for (int n = 0; n < 400; n++) begin
      logic [4:0] ra, wa;
      logic [7:0] wd;
      logic dor, dow;
      ra = 5'($urandom); wa = 5'($urandom); wd = 8'($urandom);
      dor = 1'($urandom); dow = 1'($urandom);
      if (n % 7 == 0) wa = ra;       // same-address collision
      re <= dor; raddr <= ra; we <= dow; waddr <= wa; wdata <= wd;
      held = rdata;
      exp_q = model[ra];
      @(posedge clk);
      if (dow) model[wa] = wd;
      #1;
      checks++;
      if (dor ? (rdata !== exp_q) : (rdata !== held)) begin
        failures++;
        $display("FAIL n=%0d re=%0d addr=%0d got %h exp %h", n, dor, ra, rdata, dor ? exp_q : held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
