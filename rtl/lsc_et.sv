// LSC-ET: last-iteration satisfaction check early termination for a layered
// LDPC decoder with NPAR check nodes processed in parallel.
//
// Each APP message carries one extra bit, its last-updated hard decision.
// The bit is renewed only where the PCM marks the edge as the last update of
// that variable node inside an iteration (hd_upd); elsewhere the old bit is
// kept. So during iteration i+1 every edge presents the hard decision the
// variable had at the end of iteration i, and the parity checks of a whole
// iteration are evaluated on one consistent codeword.
//
// Hard-decision bit update (combinational, in the APP write path):
//     hd_new[i] = hd_upd ? app_sign[i] : hd_old[i]
//
// Parity check (sequential): layer_start clears one XOR accumulator per
// check node; every clock with edge_v adds the carried bits hd_in; at
// layer_end any accumulator at 1 marks the iteration as unsatisfied. At
// iter_end, if every layer of the iteration was satisfied and the iteration
// was not the first one (whose carried bits are channel decisions, not
// decoded ones), stop pulses: the decoder may terminate. frame_start clears
// everything. layer_end and iter_end may come in the same clock; the last
// layer's result is then included. stop also reports a successful decoding
// (the checks are the full parity-check equations).
//
// Own choices (not specified): the interface, the iteration counter and the
// exclusion of the first iteration.
module lsc_et #(
  parameter int unsigned NPAR = 40     // check nodes per layer in parallel
) (
  input  logic            clk,
  input  logic            rst_n,
  // hard-decision bit update
  input  logic            hd_upd,
  input  logic [NPAR-1:0] app_sign,
  input  logic [NPAR-1:0] hd_old,
  output logic [NPAR-1:0] hd_new,
  // parity check
  input  logic            frame_start,
  input  logic            layer_start,
  input  logic            edge_v,
  input  logic [NPAR-1:0] hd_in,
  input  logic            layer_end,
  input  logic            iter_end,
  output logic            stop,
  output logic            unsat       // some check of this iteration failed so far
);

  assign hd_new = hd_upd ? app_sign : hd_old;

  logic [NPAR-1:0] acc;
  logic            seen_iter;
  logic            fail_now;

  assign fail_now = layer_end && (|acc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      unsat     <= 1'b0;
      seen_iter <= 1'b0;
      stop      <= 1'b0;
    end else begin
      stop <= 1'b0;
      if (frame_start) begin
        acc       <= '0;
        unsat     <= 1'b0;
        seen_iter <= 1'b0;
      end else begin
        if (layer_start)  acc <= '0;
        else if (edge_v)  acc <= acc ^ hd_in;
        if (iter_end) begin
          stop      <= seen_iter && !unsat && !fail_now;
          unsat     <= 1'b0;
          seen_iter <= 1'b1;
        end else if (fail_now) begin
          unsat <= 1'b1;
        end
      end
    end
  end

endmodule
