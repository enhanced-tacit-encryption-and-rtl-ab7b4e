// hash_unit: evaluates one of the four key-generation hash functions H-1..H-4.
//
// Each hash row has the form  base^exp (+|-) q  (rows 0-8) or  a*b*c (+|-) q
// (row 9), over the character-class counts s (lower case), t (digits),
// u (upper case) and v (special). The table itself lives in etacit_pkg. The
// row index is the value taken from the exchanged random sequence; the
// function index selects H-1..H-4. All arithmetic wraps at HASH_W bits
// (the published scheme gives no word size; 32 bits is this design's choice).
//
// Interface and timing: pulse `start` with func/row/counts valid; the inputs
// are captured. The power is formed by repeated multiplication, one multiply
// per cycle, so `done` pulses (with `result` valid and held) exp+3 cycles after
// the clock edge that samples `start`; a triple-product row takes 3 cycles. `busy` is high in between and
// `start` is ignored while busy.
module hash_unit
  import etacit_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] func,     // 0..3 = H-1..H-4
  input  logic [3:0] row,      // 0..9
  input  byte_t      cnt_s,
  input  byte_t      cnt_t,
  input  byte_t      cnt_u,
  input  byte_t      cnt_v,
  output logic       busy,
  output logic       done,
  output hword_t     result
);

  typedef enum logic [1:0] {S_IDLE, S_POW, S_FIN} state_t;
  state_t state;
  hterm_t terms;
  hword_t acc;
  byte_t  remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      terms     <= '0;
      acc       <= '0;
      remaining <= '0;
      done      <= 1'b0;
      result    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          terms     <= hash_terms(func, row, cnt_s, cnt_t, cnt_u, cnt_v);
          acc       <= hword_t'(1);
          remaining <= hash_terms(func, row, cnt_s, cnt_t, cnt_u, cnt_v).expo;
          state     <= S_POW;
        end
        S_POW: begin
          if (terms.use_prod) begin
            acc   <= terms.prod;
            state <= S_FIN;
          end else if (remaining == 0) begin
            state <= S_FIN;
          end else begin
            acc       <= acc * terms.base;
            remaining <= remaining - 1'b1;
          end
        end
        default: begin  // S_FIN
          result <= terms.sub ? acc - terms.q : acc + terms.q;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
