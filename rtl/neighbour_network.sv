// neighbour_network: direct links between each PE and its eight neighbours.
//
// The PEs form a ROWS x COLS grid, numbered row-major from the north-west
// corner (index = row*COLS + col, identity = index + 1); row 0 is the
// northern edge. Every PE has one 32-bit receive buffer per direction
// 0..7 (N, E, W, S, NE, NW, SE, SW), holding the word sent by the neighbour
// lying in that direction. A SEND from PE p towards direction d fills the
// buffer of p's neighbour for the opposite direction; it is acknowledged in
// the cycle the buffer is empty, so a second word waits until the first has
// been read. A RECEIVE by p from direction d is acknowledged, and empties the
// buffer, in a cycle the buffer holds a word; it waits otherwise. The grid
// has no wrap-around: a SEND towards a missing neighbour is acknowledged and
// dropped, and a RECEIVE from one returns zero at once. Each buffer has a
// single writer and a single reader, so all PEs proceed in parallel.
// The eight directions and their numbers follow the source description;
// the buffering, the grid orientation and the edge behaviour are this
// design's own choices.
module neighbour_network
  import mc_pkg::*;
#(
  parameter int ROWS = 3,
  parameter int COLS = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nb_req_t           req  [ROWS*COLS],
  output logic              ack  [ROWS*COLS],
  output logic [DATA_W-1:0] rdata[ROWS*COLS]
);
  localparam int N = ROWS * COLS;

  logic              full_q [N][8];
  logic [DATA_W-1:0] data_q [N][8];

  // Index of the neighbour of p in direction d, or -1 at the edge.
  function automatic int neighbour(int p, dir_e d);
    int r, c;
    r = p / COLS + dir_drow(d);
    c = p % COLS + dir_dcol(d);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return -1;
    return r * COLS + c;
  endfunction

  logic              fill [N][8];
  logic              take [N][8];

  always_comb begin
    for (int p = 0; p < N; p++) begin
      for (int d = 0; d < 8; d++) begin
        fill[p][d] = 1'b0;
        take[p][d] = 1'b0;
      end
    end
    for (int p = 0; p < N; p++) begin
      int q;
      dir_e od;
      q        = neighbour(p, req[p].dir);
      od       = opposite(req[p].dir);
      ack[p]   = 1'b0;
      rdata[p] = '0;
      if (req[p].valid) begin
        if (q < 0) begin
          ack[p] = 1'b1;
        end else if (req[p].write) begin
          ack[p] = !full_q[q][od];
          fill[q][od] = !full_q[q][od];
        end else begin
          ack[p]   = full_q[p][req[p].dir];
          rdata[p] = data_q[p][req[p].dir];
          take[p][req[p].dir] = full_q[p][req[p].dir];
        end
      end
    end
  end

  // The word sent by the neighbour in direction d of p, for each buffer.
  logic [DATA_W-1:0] fill_data [N][8];
  always_comb begin
    for (int p = 0; p < N; p++)
      for (int d = 0; d < 8; d++) begin
        int s;
        s = neighbour(p, dir_e'(d));
        fill_data[p][d] = (s < 0) ? '0 : req[s].data;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++)
        for (int d = 0; d < 8; d++) begin
          full_q[p][d] <= 1'b0;
          data_q[p][d] <= '0;
        end
    end else begin
      for (int p = 0; p < N; p++)
        for (int d = 0; d < 8; d++) begin
          if (fill[p][d]) begin
            full_q[p][d] <= 1'b1;
            data_q[p][d] <= fill_data[p][d];
          end else if (take[p][d]) begin
            full_q[p][d] <= 1'b0;
          end
        end
    end
  end
endmodule
