// ime_decision: decision unit and SAD buffer of the IME engine. For each of
// the 41 blocks it keeps the smallest SAD seen since `start` and the motion
// vector of the candidate that gave it. A candidate whose SAD equals the
// stored minimum does not replace it, so the earliest candidate in scan order
// wins a tie. `start` loads the first candidate of a search without
// comparing. One candidate per clock; results are registered.
// The document names this unit; the compare-and-keep rule is this design's.
module ime_decision
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        start,         // first candidate of a new search
  input  mv2_t        in_mv,
  input  logic [15:0] in_sad [NBLK],
  output logic [15:0] best_sad [NBLK],
  output mv2_t        best_mv  [NBLK]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBLK; i++) begin
        best_sad[i] <= '1;
        best_mv[i]  <= '0;
      end
    end else if (in_valid) begin
      for (int i = 0; i < NBLK; i++) begin
        if (start || in_sad[i] < best_sad[i]) begin
          best_sad[i] <= in_sad[i];
          best_mv[i]  <= in_mv;
        end
      end
    end
  end

endmodule
