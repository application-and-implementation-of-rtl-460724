// des_subkey -- sub-key module of the DES pipeline.
//
// All sixteen 48-bit round keys are taken at once from the 64-bit key by
// direct assignment: since PC-1, the per-round left rotations and PC-2 only
// move bits, every round-key bit is a fixed key bit (des_pkg::subkey_src), and
// the whole schedule is wiring with no logic.  The eight parity bits of the
// key are never used.  For decryption (encrypt = 0) the keys are handed out
// in reverse order, K16 first.
//
// So that a new key may come with every block, each round key then passes
// through a chain of registers as long as the number of pipeline stages that
// separate its round from the pipeline entry: k[0] (used by round 1 in the
// cycle the block enters) is not delayed, k[i] is delayed by i clocks.  Key
// and mode are thus sampled together with the block they belong to, and both
// may change on every clock.  The delay registers hold data only and have no
// reset.  Folding the schedule into wiring and registering the keys follow
// the published design; one delay chain per round key is this
// implementation's way of doing it.
module des_subkey
  import des_pkg::*;
(
  input  logic        clk,
  input  logic [63:0] key,        // DES key, sampled with the block entering round 1
  input  logic        encrypt,    // 1: encryption key order, 0: decryption
  output subkey_t     k [ROUNDS]  // k[i] feeds round i+1, delayed by i clocks
);

  subkey_t ks  [ROUNDS];  // K1..K16 of the current key
  subkey_t sel [ROUNDS];  // in the order the rounds use them

  for (genvar rn = 0; rn < ROUNDS; rn++) begin : g_sched
    for (genvar j = 0; j < 48; j++) begin : g_bit
      assign ks[rn][47-j] = key[64 - subkey_src(rn + 1, j)];
    end
    assign sel[rn] = encrypt ? ks[rn] : ks[ROUNDS-1-rn];
  end

  assign k[0] = sel[0];

  for (genvar rn = 1; rn < ROUNDS; rn++) begin : g_delay
    subkey_t dl [rn];
    always_ff @(posedge clk) begin
      dl[0] <= sel[rn];
      for (int i = 1; i < rn; i++) dl[i] <= dl[i-1];
    end
    assign k[rn] = dl[rn-1];
  end

endmodule
