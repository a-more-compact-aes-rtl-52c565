// key_schedule: AES-128 key expansion carried out entirely in a tower-field
// basis, with the eleven round keys kept in a register file.
//
// On key_load the cipher key (standard basis) is converted byte by byte with
// X^-1 and stored as round key 0. Each following clock derives the next round
// key from the previous one: RotWord, SubWord (tower Galois inverter followed by
// X^-1 M X and c = X^-1 b, i.e. the S-box expressed in the tower basis),
// the round constant (also held in the tower basis and advanced by the tower
// form of "multiply by 2"), and the chain of word XORs, which are the same in
// any basis. Round keys 1..10 are written in clocks 1..10 after the load;
// ready then rises. Converting back to the standard basis where a round needs
// it is left to the user of the keys.
//
// The source design proposes doing the whole schedule in the tower basis as
// one option; the iterative one-round-key-per-clock structure and the register
// file are this design's choices.
//
// Parameters XM, XIM: basis change tower->standard and standard->tower;
// N, NU: sub-field norms of that tower (see aes_tower_pkg).
// Ports: key_load (one-cycle pulse) with key; ready is high while all eleven
// keys are valid; rd_idx selects a round key, returned on rd_key in the same
// cycle (combinational read).
module key_schedule
  import aes_tower_pkg::*;
#(
  parameter bmat_t      XM  = X127,
  parameter bmat_t      XIM = XI127,
  parameter logic [1:0] N   = N127,
  parameter logic [3:0] NU  = NU127
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
  output logic   ready,
  input  rnd_t   rd_idx,
  output block_t rd_key
);
  localparam bmat_t KS_A   = similar(XIM, AFF_M, XM);
  localparam byte_t KS_C   = mat_apply(XIM, AFF_B);
  localparam bmat_t KS_T2  = similar(XIM, T2, XM);
  localparam byte_t RCON_1 = mat_apply(XIM, 8'h01);

  block_t rk_mem [0:NR];
  rnd_t   wr_idx;
  logic   busy;
  byte_t  rcon;

  // Next round key from the previous one.
  block_t prev, next;
  logic [31:0] rot, sub, temp;
  logic [31:0] pw [4], nw [4];

  assign prev = rk_mem[wr_idx - 4'd1];
  for (genvar w = 0; w < 4; w++) begin : g_words
    assign pw[w] = prev[127 - 32*w -: 32];
  end
  assign rot = {pw[3][23:0], pw[3][31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sub
    byte_t inv;
    gf256_inv #(.N(N), .NU(NU)) u_inv (.a(rot[31 - 8*b -: 8]), .y(inv));
    assign sub[31 - 8*b -: 8] = mat_apply(KS_A, inv) ^ KS_C;
  end

  always_comb begin
    temp  = sub ^ {rcon, 24'h0};
    nw[0] = pw[0] ^ temp;
    nw[1] = pw[1] ^ nw[0];
    nw[2] = pw[2] ^ nw[1];
    nw[3] = pw[3] ^ nw[2];
    next  = {nw[0], nw[1], nw[2], nw[3]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      ready  <= 1'b0;
      wr_idx <= '0;
      rcon   <= '0;
    end else if (key_load) begin
      rk_mem[0] <= mat_apply_block(XIM, key);
      busy      <= 1'b1;
      ready     <= 1'b0;
      wr_idx    <= 4'd1;
      rcon      <= RCON_1;
    end else if (busy) begin
      rk_mem[wr_idx] <= next;
      rcon           <= mat_apply(KS_T2, rcon);
      wr_idx         <= wr_idx + 4'd1;
      if (wr_idx == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  assign rd_key = rk_mem[rd_idx];
endmodule
