`timescale 1ps/1ps
// su_merge: round-robin merge of several sampling units' event streams.
//
// The PCI board has one 32-bit FIFO input, while an SPU serves several
// sampling units. This arbiter grants one unit at a time and keeps the grant
// until that unit's word flagged last has moved, so records are never
// interleaved; the next grant goes to the next requesting unit after the
// previous winner. Valid/ready handshake on every stream, all in one clock.
// The merge itself is this design's choice: the original system does not say how the
// units share the board.
module su_merge
  import pet_pkg::*;
#(
  parameter int N = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0][WORD_W-1:0] in_data,
  input  logic [N-1:0]           in_valid,
  input  logic [N-1:0]           in_last,
  output logic [N-1:0]           in_ready,
  output logic [WORD_W-1:0]      out_data,
  output logic                   out_valid,
  output logic                   out_last,
  input  logic                   out_ready
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] grant, next_grant;
  logic          locked;

  // next requester after 'grant', in round-robin order: scan from the
  // farthest candidate (grant itself) to the nearest so the nearest wins
  always_comb begin
    next_grant = grant;
    for (int k = N; k >= 1; k--) begin
      if (in_valid[(int'(grant) + k) % N]) next_grant = IW'((int'(grant) + k) % N);
    end
  end

  logic [IW-1:0] sel;
  assign sel = locked ? grant : next_grant;

  assign out_data  = in_data[sel];
  assign out_valid = in_valid[sel];
  assign out_last  = in_last[sel];

  always_comb begin
    in_ready      = '0;
    in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant  <= '0;
      locked <= 1'b0;
    end else if (out_valid && out_ready) begin
      grant  <= sel;
      locked <= !out_last;
    end
  end

endmodule
