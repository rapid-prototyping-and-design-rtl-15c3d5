// rng_xor_handler: the conditioner. XORs N_WORDS raw cell words into one word.
//
// Raw bits from the random-bit cells are biased towards 0 or 1. XORing
// independent biased bits pushes the result towards an even split, so this
// block reads N_WORDS consecutive 32-bit words from its cell memory
// (rng_cell_mem), XORs them bit by bit, and offers the result on `bitsout`
// with `rdy_snd` high. It holds the word until the controller pulses
// `got_it`, then drops `rdy_snd` and only then starts on the next word. The
// memory address runs on from word to word and wraps at 2^ADDR_W, so no cell
// word is used twice before the wrap.
//
// Timing: one memory read is issued per clock; with the one-cycle read
// latency a word takes N_WORDS+1 cycles in FILL, and `rdy_snd` rises the
// cycle after that. After `got_it` is seen, `rdy_snd` is low on the next
// cycle and the next word is ready N_WORDS+2 cycles after the `got_it` cycle.
//
// From the design description: the sixteen-word XOR, the memory of cell
// bits inside this block with a 20-bit address, the ports got_it / rdy_snd /
// bitsout, and that the next word is made only after got_it. The two-state
// FSM, the asynchronous active-low reset and the write port that lets the
// cell words be stored (brought out as cell_*) are this implementation's.
module rng_xor_handler
  import rng_pkg::*;
#(
  parameter int unsigned ADDR_W  = 20,   // cell memory address width
  parameter int unsigned N_WORDS = 16    // cell words XORed per output word
) (
  input  logic              clk,
  input  logic              rst_n,
  // handshake with the controller
  input  logic              got_it,      // controller has taken bitsout
  output logic              rdy_snd,     // bitsout holds a fresh word
  output word_t             bitsout,
  // write port of the cell memory (raw cell words)
  input  logic              cell_we,
  input  logic [ADDR_W-1:0] cell_waddr,
  input  word_t             cell_wdata
);

  localparam int unsigned CNT_W = $clog2(N_WORDS + 1);

  typedef enum logic {ST_FILL, ST_SEND} state_e;

  state_e            state;
  logic [CNT_W-1:0]  count;     // cycles spent in ST_FILL
  logic [ADDR_W-1:0] memaddr;   // next cell word to read
  word_t             temp;      // running XOR
  word_t             currbit;   // word returned by the memory

  rng_cell_mem #(
    .WIDTH  (WORD_W),
    .ADDR_W (ADDR_W)
  ) u_mem (
    .clk   (clk),
    .we    (cell_we),
    .waddr (cell_waddr),
    .wdata (cell_wdata),
    .raddr (memaddr),
    .rdata (currbit)
  );

  // In ST_FILL, cycle `count` issues read number `count` (while count <
  // N_WORDS) and folds in the word read in the previous cycle (count > 0).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_FILL;
      count   <= '0;
      memaddr <= '0;
      temp    <= '0;
      bitsout <= '0;
      rdy_snd <= 1'b0;
    end else begin
      unique case (state)
        ST_FILL: begin
          if (count < CNT_W'(N_WORDS)) memaddr <= memaddr + 1'b1;
          if (count == CNT_W'(N_WORDS)) begin
            bitsout <= temp ^ currbit;
            rdy_snd <= 1'b1;
            temp    <= '0;
            count   <= '0;
            state   <= ST_SEND;
          end else begin
            if (count != '0) temp <= temp ^ currbit;
            count <= count + 1'b1;
          end
        end
        ST_SEND: begin
          if (got_it) begin
            rdy_snd <= 1'b0;
            state   <= ST_FILL;
          end
        end
        default: state <= ST_FILL;
      endcase
    end
  end

  // The offered word is held, unchanged, until the controller takes it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rdy_snd && !got_it |=> rdy_snd && $stable(bitsout))
    else $error("rdy_snd dropped or bitsout changed before got_it");

endmodule
