// knn_kselect: keeps the K nearest candidates seen so far.
//
// Candidates (squared distance, pixel number) arrive one per cycle. The
// list is kept sorted by distance in a register array; a new candidate goes
// after every entry whose distance is <= its own, so equal distances keep
// their arrival order, and the entries behind it shift down one place (the
// last one falls off when the list is full). Distance 0 (the query pixel
// itself) is ignored. The document finds the neighbours with K passes over
// the window, each taking the next larger distance and all of its ties in
// scan order; this keeps exactly the same K candidates in one pass, which
// is this design's choice (W cycles per query instead of K*W).
//
// Interface: 'clear' empties the list; 'in_valid' with in_dist/in_idx
// inserts at the clock edge; 'count' (0..K), 'nb_idx[]' and 'nb_dist[]'
// (nearest first) are registered.
module knn_kselect #(
  parameter int K  = 40,
  parameter int DW = 64,
  parameter int IW = 18,
  localparam int KW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic [DW-1:0] in_dist,
  input  logic [IW-1:0] in_idx,
  output logic [KW-1:0] count,
  output logic [IW-1:0] nb_idx  [K],
  output logic [DW-1:0] nb_dist [K]
);
  // keep[e]: entry e stays where it is (it is valid and not farther)
  logic keep [K];
  always_comb begin
    for (int e = 0; e < K; e++)
      keep[e] = (KW'(e) < count) && (nb_dist[e] <= in_dist);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int e = 0; e < K; e++) begin nb_idx[e] <= '0; nb_dist[e] <= '0; end
    end else if (clear) begin
      count <= '0;
    end else if (in_valid && in_dist != '0) begin
      for (int e = 0; e < K; e++) begin
        if (!keep[e]) begin
          if (e == 0 || keep[e-1]) begin       // insertion point
            nb_dist[e] <= in_dist;
            nb_idx[e]  <= in_idx;
          end else begin                       // shift down
            nb_dist[e] <= nb_dist[e-1];
            nb_idx[e]  <= nb_idx[e-1];
          end
        end
      end
      if (count != KW'(K) || !keep[K-1]) begin
        if (count != KW'(K)) count <= count + 1'b1;
      end
    end
  end
endmodule
