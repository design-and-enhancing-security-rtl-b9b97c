// tb_image_crypto_top: end-to-end test of the image stream cipher at its
// default (and only) size, one 256x256 8-bit image per pass.
//
// Pass 1: a synthetic test image (smooth gradients plus a flat block, so its
// neighbouring pixels are strongly correlated) is streamed with random gaps in
// pix_valid. Every cipher pixel is checked against pixel XOR the model key
// byte, and every decrypted pixel against the original. The cipher image's
// histogram entropy, neighbour correlation, NPCR and UACI against the plain
// image are computed and checked against loose bounds.
// Pass 2: the same image at one pixel per clock (no gaps, counting cycles to
// check the 8 bits per clock rate) with a receiver key that differs in the
// last bit of one word: decryption must fail for almost every pixel.
// Mechanisms counted: start pulse loads, stall cycles, tent branches taken on
// both sides of 0.5, negative Lozi inputs (|x| path), wrong-key decryption.
module tb_image_crypto_top;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  localparam int W = 256, H = 256, N = W * H;

  logic clk = 0, rst_n = 0, pix_valid = 0;
  logic [7:0] pix_in, cipher_out, plain_out;
  logic out_valid;
  key_t key_tx, key_rx;
  int checks = 0, failures = 0;
  int n_start = 0, n_stall = 0, n_tent_low = 0, n_tent_high = 0, n_lozi_neg = 0;
  int n_wrong_key_diff = 0;

  byte unsigned img[N];
  byte unsigned cip[N];

  image_crypto_top dut (.clk, .rst_n, .pix_valid, .pix_in, .key_tx, .key_rx,
                        .cipher_out, .plain_out, .out_valid);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic key_t to_key(rkey_t k);
    return '{log_r: k.r, log_x0: k.lx0, lozi_a: k.a, lozi_b: k.b, lozi_x0: k.zx0,
             lozi_y0: k.zy0, tent_mu: k.mu, tent_x0: k.tx0, pn_seed: k.seed};
  endfunction

  // Stream the image; gaps = 1 puts random idle cycles between pixels.
  task automatic stream(rkey_t ktx, rkey_t krx, bit gaps, bit expect_plain, output longint cycles);
    gen_t gt, gr;
    int xt;
    byte unsigned pnb, kb_tx, kb_rx;
    gt = '{fb: 0, y: 0, pn: 0, started: 0, tent_low: 0, lozi_neg: 0};
    gr = gt;
    key_tx = to_key(ktx);
    key_rx = to_key(krx);
    rst_n = 0; pix_valid = 0;
    @(negedge clk); rst_n = 1;
    cycles = 0;
    for (int i = 0; i < N; i++) begin
      while (gaps && $urandom_range(15) == 0) begin
        pix_valid = 0;
        @(negedge clk);
        n_stall++;
        cycles++;
      end
      pix_valid = 1;
      pix_in = img[i];
      if (!gt.started) n_start++;
      #1;
      xt = ref_cascade_step(gt, ktx, pnb);
      kb_tx = xt[7:0] ^ pnb;
      if (gt.tent_low) n_tent_low++; else n_tent_high++;
      if (gt.lozi_neg) n_lozi_neg++;
      xt = ref_cascade_step(gr, krx, pnb);
      kb_rx = xt[7:0] ^ pnb;
      check(out_valid == 1, "out_valid follows pix_valid");
      check(cipher_out == (img[i] ^ kb_tx),
            $sformatf("pixel %0d cipher %h want %h", i, cipher_out, img[i] ^ kb_tx));
      check(plain_out == (img[i] ^ kb_tx ^ kb_rx), $sformatf("pixel %0d decrypted", i));
      if (expect_plain) check(plain_out == img[i], $sformatf("pixel %0d round trip", i));
      else if (plain_out != img[i]) n_wrong_key_diff++;
      cip[i] = cipher_out;
      @(negedge clk);
      cycles++;
    end
    pix_valid = 0;
  endtask

  initial begin
    longint cycles;
    rkey_t kbad;
    int hist[256];
    real ent, p, sx, sy, sxx, syy, sxy, corr, npcr, uaci, nn;

    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r*W + c] = (r >= 96 && r < 160 && c >= 64 && c < 128) ? 8'd30
                     : 8'((r + c) / 2 + ((r * c) >> 10));

    // ---- pass 1: correct key, stream with gaps ----
    stream(REF_DEFAULT_KEY, REF_DEFAULT_KEY, 1, 1, cycles);

    foreach (hist[v]) hist[v] = 0;
    for (int i = 0; i < N; i++) hist[cip[i]]++;
    ent = 0.0;
    foreach (hist[v]) if (hist[v] > 0) begin
      p = real'(hist[v]) / real'(N);
      ent -= p * $ln(p) / $ln(2.0);
    end
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; nn = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W - 1; c++) begin
        real a, b;
        a = real'(cip[r*W + c]); b = real'(cip[r*W + c + 1]);
        sx += a; sy += b; sxx += a*a; syy += b*b; sxy += a*b; nn += 1.0;
      end
    corr = (sxy/nn - (sx/nn)*(sy/nn)) /
           ($sqrt(sxx/nn - (sx/nn)**2) * $sqrt(syy/nn - (sy/nn)**2));
    npcr = 0; uaci = 0;
    for (int i = 0; i < N; i++) begin
      if (cip[i] != img[i]) npcr += 1.0;
      uaci += ((cip[i] > img[i]) ? real'(cip[i] - img[i]) : real'(img[i] - cip[i])) / 255.0;
    end
    npcr = 100.0 * npcr / N;
    uaci = 100.0 * uaci / N;
    $display("cipher image: entropy=%f corr_h=%f NPCR=%f%% UACI=%f%%", ent, corr, npcr, uaci);
    check(ent > 7.99, "cipher entropy above 7.99 bits");
    check(corr < 0.02 && corr > -0.02, "cipher neighbour correlation near 0");
    check(npcr > 99.0, "NPCR above 99%");
    check(uaci > 25.0 && uaci < 40.0, "UACI in 25..40%");

    // ---- pass 2: wrong receiver key, one pixel per clock ----
    kbad = REF_DEFAULT_KEY;
    kbad.r = kbad.r ^ 1;
    stream(REF_DEFAULT_KEY, kbad, 0, 0, cycles);
    check(cycles == N, $sformatf("one pixel per clock: %0d cycles for %0d pixels", cycles, N));
    check(n_wrong_key_diff > N * 95 / 100,
          $sformatf("wrong key garbles the image (%0d of %0d differ)", n_wrong_key_diff, N));

    $display("mechanisms: start=%0d stall=%0d tent_low=%0d tent_high=%0d lozi_neg=%0d wrong_key_diff=%0d",
             n_start, n_stall, n_tent_low, n_tent_high, n_lozi_neg, n_wrong_key_diff);
    check(n_start == 2, "start pulse once per image");
    check(n_stall > 0, "stall happened");
    check(n_tent_low > 0 && n_tent_high > 0, "both tent branches happened");
    check(n_lozi_neg > 0, "negative Lozi input happened");
    check(n_wrong_key_diff > 0, "wrong-key decryption happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
