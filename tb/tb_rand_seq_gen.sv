// tb_rand_seq_gen: checks two consecutive sequences against an LFSR model,
// the done timing (SEQ_LEN+1 cycles) and that every character is printable.
module tb_rand_seq_gen;
  import etacit_pkg::*;
  import etacit_ref_pkg::*;

  localparam int L = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done;
  logic [L-1:0][7:0] seq;
  int checks = 0, failures = 0;

  rand_seq_gen #(.SEQ_LEN(L), .SEED(16'h1234)) dut (.clk, .rst_n, .start, .busy, .done, .seq);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] st = 16'h1234;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3; n++) begin
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!done && cyc < 100);
      checks++;
      if (cyc != L + 1) begin failures++; $display("FAIL done after %0d cycles", cyc); end
      for (int i = 0; i < L; i++) begin
        bit [7:0] e;
        e = ref_next_char(st);
        checks++;
        if (seq[i] !== e || seq[i] < 8'h21 || seq[i] > 8'h7e) begin
          failures++;
          $display("FAIL seq %0d char %0d: got %h exp %h", n, i, seq[i], e);
        end
      end
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
