// addr_counter: the finite-state machine that walks a deinterleaver block.
//
// A one-cycle start pulse, taken in IDLE or in the cycle that holds last, loads the last column index
// cols_m1 and moves the FSM to RUN. In RUN one position is produced per clock:
// the column index i counts 0..cols_m1, then wraps and the row index j
// advances, for D rows. Alongside i and j the FSM keeps i mod 3 and j mod 3 as
// wrap-around counters, so the 64-QAM address logic needs no divider, and the
// linear position n = j*(cols_m1+1) + i as a plain counter. valid is high in
// every RUN cycle; last marks the final position (i = cols_m1, j = D-1), after
// which the FSM returns to IDLE unless start is high in that cycle, in which
// case the next block begins without a gap. A block of Ncbps positions takes
// Ncbps clocks; start at any other time in a block is ignored.
//
// Row-by-row order with i fastest follows the reference waveforms; the
// start/valid/last handshake and the active-low synchronous reset are this
// design's own choices.
module addr_counter
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  col_t        cols_m1,
  output col_t        i,
  output row_t        j,
  output logic [1:0]  i_mod3,
  output logic [1:0]  j_mod3,
  output addr_t       n,
  output logic        valid,
  output logic        last
);

  typedef enum logic {IDLE, RUN} state_t;
  state_t state;
  col_t   cols_m1_q;

  logic end_of_row;
  assign end_of_row = (i == cols_m1_q);
  assign valid      = (state == RUN);
  assign last       = valid && end_of_row && (j == row_t'(D - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      cols_m1_q <= '0;
      i         <= '0;
      j         <= '0;
      i_mod3    <= '0;
      j_mod3    <= '0;
      n         <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start) begin
            state     <= RUN;
            cols_m1_q <= cols_m1;
            i         <= '0;
            j         <= '0;
            i_mod3    <= '0;
            j_mod3    <= '0;
            n         <= '0;
          end
        end
        RUN: begin
          n <= n + 1'b1;
          if (end_of_row) begin
            i      <= '0;
            i_mod3 <= '0;
            j      <= j + 1'b1;
            j_mod3 <= (j_mod3 == 2'd2) ? 2'd0 : j_mod3 + 1'b1;
            if (last) state <= IDLE;
            if (last && start) begin   // chain the next block
              state     <= RUN;
              cols_m1_q <= cols_m1;
              i         <= '0;
              j         <= '0;
              i_mod3    <= '0;
              j_mod3    <= '0;
              n         <= '0;
            end
          end else begin
            i      <= i + 1'b1;
            i_mod3 <= (i_mod3 == 2'd2) ? 2'd0 : i_mod3 + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The mod-3 counters must track the indices they shadow.
  a_imod3: assert property (@(posedge clk) disable iff (!rst_n)
                            valid |-> (32'(i_mod3) == 32'(i) % 3));
  a_jmod3: assert property (@(posedge clk) disable iff (!rst_n)
                            valid |-> (32'(j_mod3) == 32'(j) % 3));

endmodule
