// voting_table: combines the per-tree decisions of a random forest.
//
// Every tree whose code table hit casts one vote for its class. The class
// with the most votes wins. When several classes have the same, largest
// number of votes, the one backed by the highest certainty wins (the
// certainty of a class is the largest certainty among the trees voting for
// it); if that is also equal, the class of the lowest-numbered tree wins.
// With no vote at all, `valid` is 0.
//
// Combinational; the enclosing match-action stage registers the result.
// `tie` reports that the certainty rule decided. Majority voting with
// certainty tie-break follows the published design; computing it with
// comparators rather than a precomputed table of vote combinations is this
// design's choice.
module voting_table
  import henna_pkg::*;
#(
  parameter int unsigned TREES = 3
) (
  input  logic [TREES-1:0] in_valid,
  input  class_t           in_class [TREES],
  input  cert_t            in_cert  [TREES],
  output logic             valid,
  output class_t           cls,
  output logic             tie
);

  localparam int unsigned CNT_W = $clog2(TREES + 1);

  logic [CNT_W-1:0] votes    [TREES];   // votes for the class of tree i
  cert_t            best_crt [TREES];   // certainty backing that class

  always_comb begin
    for (int i = 0; i < TREES; i++) begin
      votes[i]    = '0;
      best_crt[i] = '0;
      for (int j = 0; j < TREES; j++) begin
        if (in_valid[i] && in_valid[j] && in_class[j] == in_class[i]) begin
          votes[i] = votes[i] + 1'b1;
          if (in_cert[j] > best_crt[i]) best_crt[i] = in_cert[j];
        end
      end
    end
  end

  always_comb begin
    logic [CNT_W-1:0] bv;
    cert_t            bc;
    logic             contested;
    valid     = 1'b0;
    cls       = '0;
    bv        = '0;
    bc        = '0;
    contested = 1'b0;
    for (int i = 0; i < TREES; i++) begin
      if (in_valid[i]) begin
        if (!valid || votes[i] > bv || (votes[i] == bv && best_crt[i] > bc)) begin
          valid = 1'b1;
          bv    = votes[i];
          bc    = best_crt[i];
          cls   = in_class[i];
        end
      end
    end
    // a tie is another class reaching the winning vote count
    for (int i = 0; i < TREES; i++)
      if (in_valid[i] && votes[i] == bv && in_class[i] != cls) contested = 1'b1;
    tie = valid && contested;
  end

endmodule
