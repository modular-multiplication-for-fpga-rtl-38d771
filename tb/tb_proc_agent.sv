// tb_proc_agent: driver and scoreboard for one IDEA processor (unrolled or
// iterative), used by the processor-level testbenches. After `start` it:
//   1. loads the encryption subkeys of key 0001 0002 ... 0008 through the
//      subkey write port;
//   2. sends the published test block 0000 0001 0002 0003 alone and checks
//      the ciphertext 11FB ED2B 0198 6DE5 and the latency LAT (from the
//      input handshake to out_valid);
//   3. streams NB random blocks (in_valid high most cycles), checks every
//      result in order against the reference model, counts refused cycles
//      (in_valid high, in_ready low) and, if SPACING > 0, checks that
//      accepted blocks are exactly SPACING cycles apart once the stream is
//      running; with ITER = 0 every latency must equal LAT;
//   4. runs NCBC blocks in CBC mode (each plaintext XORed with the previous
//      ciphertext, so every block waits for the previous result), checking
//      the data and the latency LAT of each block;
//   5. loads the decryption subkeys and decrypts the ciphertexts of step 3,
//      checking that the plaintexts come back.
// Results: checks, failures, and counters of the mechanisms seen.
module tb_proc_agent
  import idea_pkg::*;
  import idea_ref_pkg::*;
#(
  parameter bit          ITER    = 1'b0,
  parameter int unsigned LAT     = 109,
  parameter int unsigned SPACING = 0,
  parameter int unsigned NB      = 200,
  parameter int unsigned NCBC    = 6
) (
  input  logic       clk,
  input  logic       start,
  output logic       done,
  output logic       key_we,
  output logic [5:0] key_addr,
  output word_t      key_data,
  output logic       in_valid,
  input  logic       in_ready,
  output block_t     in_block,
  input  logic       out_valid,
  input  block_t     out_block,
  output int         checks,
  output int         failures,
  output int         refusals,    // cycles with in_valid high and in_ready low
  output int         multipass,   // blocks that went round the hardware rounds more than once
  output int         cbc_blocks,  // blocks chained in CBC mode
  output int         decrypted    // blocks decrypted with the inverse subkeys
);
  typedef struct { block_t exp; longint t_in; bit timed; } item_t;

  item_t  sb [$];
  longint cyc = 0;
  block_t last_out;
  int     n_out = 0;
  bit     timed_now = 1'b1;

  always @(posedge clk) cyc <= cyc + 1;

  // Scoreboard: compare every result in order.
  always @(negedge clk) begin
    if (out_valid) begin
      item_t it;
      last_out = out_block;
      n_out++;
      if (sb.size() == 0) begin
        checks++; failures++;
        $display("unexpected output %h", out_block);
      end else begin
        it = sb.pop_front();
        checks++;
        if (out_block !== it.exp) begin
          failures++;
          if (failures < 10) $display("MISMATCH: got %h exp %h", out_block, it.exp);
        end
        if (it.timed) begin
          checks++;
          if (cyc - it.t_in != longint'(LAT)) begin
            failures++;
            if (failures < 10) $display("LATENCY: got %0d exp %0d", cyc - it.t_in, LAT);
          end
        end
        if (ITER && (ROUNDS > 1)) multipass++;
      end
    end
  end

  task automatic load_keys(subkeys_t k);
    for (int i = 0; i < NSUBKEYS; i++) begin
      @(negedge clk);
      key_we = 1'b1; key_addr = 6'(i); key_data = k[i];
    end
    @(negedge clk);
    key_we = 1'b0;
  endtask

  // Present one block and hold it until it is accepted. Returns the cycle
  // of the handshake.
  task automatic send(block_t b, block_t exp, bit timed);
    item_t it;
    in_valid = 1'b1; in_block = b;
    forever begin
      #1;
      if (!ITER || in_ready) break;
      refusals++;
      @(negedge clk);
    end
    it.exp = exp; it.t_in = cyc; it.timed = timed;
    sb.push_back(it);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic wait_empty();
    while (sb.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    subkeys_t ek, dk;
    block_t   pt [NB];
    block_t   ct [NB];
    block_t   p, iv, prev;
    longint   t_prev;
    done = 1'b0; key_we = 1'b0; key_addr = '0; key_data = '0;
    in_valid = 1'b0; in_block = '0;
    checks = 0; failures = 0; refusals = 0; multipass = 0; cbc_blocks = 0; decrypted = 0;
    wait (start);
    @(negedge clk);

    // 1. subkeys
    ek = ref_enc_keys(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    dk = ref_dec_keys(ek);
    load_keys(ek);

    // 2. published test block
    p = {16'h0003, 16'h0002, 16'h0001, 16'h0000};          // word 0 = 0000
    checks++;
    if (ref_cipher(p, ek) !== {16'h6DE5, 16'h0198, 16'hED2B, 16'h11FB}) begin
      failures++;
      $display("reference model disagrees with the published test vector");
    end
    send(p, {16'h6DE5, 16'h0198, 16'hED2B, 16'h11FB}, 1'b1);
    wait_empty();

    // 3. stream
    t_prev = -1;
    for (int i = 0; i < NB; i++) begin
      pt[i] = rand_block();
      if (i % 4 == 0) pt[i][0] = '0;
      ct[i] = ref_cipher(pt[i], ek);
      if (!ITER && ($urandom_range(0, 9) == 0)) @(negedge clk);   // idle cycle
      send(pt[i], ct[i], !ITER);
      if (SPACING > 0 && i > 2) begin
        checks++;
        if (cyc - 1 - t_prev != longint'(SPACING)) begin
          failures++;
          if (failures < 10) $display("SPACING: got %0d exp %0d", cyc - 1 - t_prev, SPACING);
        end
      end
      t_prev = cyc - 1;
    end
    wait_empty();

    // 4. CBC chaining: each block waits for the previous ciphertext
    iv = rand_block();
    prev = iv;
    for (int i = 0; i < NCBC; i++) begin
      block_t x;
      int n0;
      x = rand_block() ^ prev;
      n0 = n_out;
      send(x, ref_cipher(x, ek), 1'b1);
      while (n_out == n0) @(negedge clk);
      checks++;
      if (last_out !== ref_cipher(x, ek)) failures++;
      prev = last_out;
      cbc_blocks++;
    end
    wait_empty();

    // 5. decryption with the inverse subkeys
    load_keys(dk);
    for (int i = 0; i < NB; i++) begin
      send(ct[i], pt[i], !ITER);
      decrypted++;
    end
    wait_empty();
    done = 1'b1;
  end
endmodule
