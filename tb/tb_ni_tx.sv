// tb_ni_tx: three packets of N_CHARS characters with random input gaps and
// random output back-pressure; checks the HEAD flit (destination), the
// BODY flits and the TAIL on the last character, and that in_ready stays low
// while the head is sent.
module tb_ni_tx;
  import etacit_pkg::*;

  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [5:0] dest;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  byte_t in_data = '0;
  flit_t out_flit;
  int checks = 0, failures = 0;
  flit_t expq [$];

  ni_tx #(.N_CHARS(N)) dut (.clk, .rst_n, .dest, .in_valid, .in_ready, .in_data,
                             .out_valid, .out_ready, .out_flit);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= 1'($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      flit_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected flit %h", out_flit); end
      else begin
        e = expq.pop_front();
        if (out_flit != e) begin failures++; $display("FAIL got %h exp %h", out_flit, e); end
      end
      if (out_flit.ftype == FT_HEAD) begin
        checks++;
        if (in_ready) begin failures++; $display("FAIL in_ready high during head"); end
      end
    end
  end

  initial begin
    dest = 6'h2d;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < 3; p++) begin
      flit_t f;
      f = '0;
      dest = 6'($urandom);
      f.ftype = FT_HEAD; f.data = {2'b00, dest};
      expq.push_back(f);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = 8'($urandom);
        f.ftype = (i == N - 1) ? FT_TAIL : FT_BODY;
        f.data  = in_data;
        expq.push_back(f);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1;
        if ($urandom_range(0, 2) == 0) begin in_valid = 1'b0; @(negedge clk); end
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (3) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d flits not sent", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
