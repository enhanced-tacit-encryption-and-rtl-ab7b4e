// tb_ni_rx: feeds packets (HEAD, BODY..., TAIL) with random gaps and random
// output back-pressure; checks that heads are dropped, payload bytes come out
// in order with out_last on the TAIL byte, and that pkt_count counts packets.
module tb_ni_rx;
  import etacit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_last;
  flit_t in_flit = '0;
  byte_t out_data;
  logic [15:0] pkt_count;
  int checks = 0, failures = 0;
  bit [8:0] expq [$];   // {last, data}

  ni_rx dut (.clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready,
             .out_data, .out_last, .pkt_count);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= 1'($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      bit [8:0] e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected byte"); end
      else begin
        e = expq.pop_front();
        if ({out_last, out_data} != e) begin
          failures++; $display("FAIL got %0d/%h exp %0d/%h", out_last, out_data, e[8], e[7:0]);
        end
      end
    end
  end

  initial begin
    int npk = 5;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < npk; p++) begin
      int nb;
      nb = $urandom_range(1, 6);
      for (int k = 0; k <= nb; k++) begin
        flit_t f;
        f = '0;
        if (k == 0) begin f.ftype = FT_HEAD; f.data = 8'($urandom); end
        else begin
          f.ftype = (k == nb) ? FT_TAIL : FT_BODY;
          f.data  = 8'($urandom);
          expq.push_back({k == nb, f.data});
        end
        @(negedge clk);
        in_flit = f;
        in_valid = 1'b1;
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1;
        if ($urandom_range(0, 2) == 0) begin in_valid = 1'b0; @(negedge clk); end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bytes missing", expq.size()); end
    checks++;
    if (pkt_count != 16'(npk)) begin failures++; $display("FAIL pkt_count %0d", pkt_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
