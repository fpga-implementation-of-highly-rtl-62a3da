// tb_aes_gcm_top_alt: the end-to-end test of tb_aes_gcm_top run on the
// engine's alternative build: composite-field logic S-boxes
// (COMPOSITE_SBOX = 1) and four-step Karatsuba-Ofman multipliers
// (KO_STEPS = 4) in GHASH and in the hash-key powers. The stimulus, the
// reference comparison of every block and tag, the latency checks and the
// mechanism counts are the same.
module tb_aes_gcm_top_alt;
  import gcm_ref_pkg::*;
  localparam int Q = 8;

  logic clk = 0, rst_n = 0;
  logic key_load = 0, key_ready;
  blk_t key;
  logic msg_start = 0, decrypt = 0;
  logic [95:0] iv;
  logic in_valid = 0, in_ready, in_aad = 0, in_last = 0;
  logic [3:0] in_count;
  blk_t in_blocks [Q];
  logic out_valid, tag_valid;
  logic [3:0] out_count;
  blk_t out_blocks [Q];
  blk_t tag;

  aes_gcm_top #(.KO_STEPS(4), .COMPOSITE_SBOX(1'b1)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_partial = 0, n_aad = 0, n_decrypt = 0, n_b2b = 0, n_rekey = 0, n_empty = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;  // edges so far, read before update

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output blocks and tags, in order.
  blk_t exp_data[$];
  int   exp_t[$];     // cycle each data beat was accepted (one per beat)
  blk_t exp_tag[$];
  int   len_t[$];     // cycle each length block was inserted

  always @(posedge clk) if (rst_n && in_valid && in_ready && !msg_start) begin
    if (in_count < Q) n_partial++;
    if (in_aad) n_aad++;
    if (!in_aad && in_count != 0) exp_t.push_back(cycle);
  end
  // The length-block insertion: a cycle with the key ready but no input taken.
  always @(posedge clk) if (rst_n && key_ready && !in_ready) begin
    n_stall++;
    len_t.push_back(cycle);
  end

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      int t;
      checks++;
      t = exp_t.pop_front();
      if (cycle - t != 10) begin failures++; $display("FAIL data latency %0d", cycle - t); end
      for (int i = 0; i < int'(out_count); i++) begin
        blk_t e;
        e = exp_data.pop_front();
        checks++;
        if (out_blocks[i] !== e) begin
          failures++; $display("FAIL out block got %h exp %h", out_blocks[i], e);
        end
      end
    end
    if (tag_valid) begin
      blk_t e;
      e = exp_tag.pop_front();
      checks += 2;
      if (len_t.size() == 0 || cycle - len_t[0] != 11) begin
        failures++; $display("FAIL tag timing");
      end
      if (len_t.size() != 0) void'(len_t.pop_front());
      if (tag !== e) begin failures++; $display("FAIL tag got %h exp %h", tag, e); end
    end
  end

  task automatic load_key(input blk_t k);
    int cyc;
    @(negedge clk); key_load = 1; key = k;
    @(negedge clk); key_load = 0;
    cyc = 1;
    while (!key_ready && cyc < 100) begin @(negedge clk); cyc++; end
    // 11 key-schedule cycles, 1 to issue the zero block, 10 AES, 1 to
    // capture H, 4 for the powers, 1 to enter the ready state
    checks++;
    if (cyc != 28) begin failures++; $display("FAIL key setup took %0d cycles", cyc); end
  endtask

  // Send one message; the tag must arrive 11 cycles after the length beat.
  task automatic message(input blk_t k, input logic [95:0] v, input blk_q_t aad,
                         input blk_q_t din, input bit dec, input bit wait_done,
                         input bit check_tag_value, input blk_t known_tag);
    blk_q_t dout;
    blk_t   t;
    int     na = aad.size(), nd = din.size(), ia = 0, id = 0;
    gcm(k, v, aad, din, dec, dout, t);
    if (check_tag_value) begin
      checks++;
      if (t !== known_tag) begin failures++; $display("FAIL reference vs published tag %h", t); end
    end
    foreach (dout[i]) exp_data.push_back(dout[i]);
    exp_tag.push_back(t);
    if (dec) n_decrypt++;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    if (exp_tag.size() > 1 || (exp_t.size() > 0)) n_b2b++;
    msg_start = 1; iv = v; decrypt = dec;
    @(negedge clk);
    msg_start = 0;
    if (na == 0 && nd == 0) begin
      // empty message: one beat with no blocks ends it
      in_valid = 1; in_aad = 0; in_count = 0; in_last = 1;
      while (!in_ready) @(negedge clk);  // in_ready holds for the next edge
      @(negedge clk);
      n_empty++;
    end
    while (ia < na || id < nd) begin
      int c, room;
      bit is_aad;
      is_aad = ia < na;
      room   = is_aad ? na - ia : nd - id;
      c = 1 + $urandom % Q;
      if ($urandom % 2) c = Q;
      if (c > room) c = room;
      in_valid = 1; in_aad = is_aad; in_count = 4'(c);
      for (int i = 0; i < Q; i++) in_blocks[i] = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < c; i++) in_blocks[i] = is_aad ? aad[ia+i] : din[id+i];
      in_last = is_aad ? (ia + c == na && nd == 0) : (id + c == nd);
      while (!in_ready) @(negedge clk);  // in_ready holds for the next edge
      @(negedge clk);
      if (is_aad) ia += c; else id += c;
    end
    in_valid = 0; in_last = 0;
    if (wait_done) begin
      int cyc = 0;
      while (exp_tag.size() > 0 && cyc < 100) begin @(negedge clk); cyc++; end
    end
  endtask

  function automatic blk_q_t rnd_blocks(input int n);
    blk_q_t q;
    for (int i = 0; i < n; i++) q.push_back({$urandom, $urandom, $urandom, $urandom});
    return q;
  endfunction

  initial begin
    blk_q_t none, one_zero;
    blk_t   k2;
    init();
    one_zero.push_back('0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Published GCM test cases 1 and 2 (key and IV all zero).
    load_key('0);
    message('0, '0, none, none, 0, 1, 1, 128'h58e2fccefa7e3061367f1d57a4e7455a);
    checks++;
    if (exp_tag.size() != 0) begin failures++; $display("FAIL test case 1 produced no tag"); end
    message('0, '0, none, one_zero, 0, 1, 1, 128'hab6e47d42cec13bdf53a67b21257bddf);
    // Random messages, some back to back
    k2 = {$urandom, $urandom, $urandom, $urandom};
    load_key(k2);
    n_rekey++;
    for (int m = 0; m < 24; m++) begin
      logic [95:0] v;
      int na, nd;
      v  = {$urandom, $urandom, $urandom};
      na = (m % 5 == 0) ? 0 : $urandom % 12;
      nd = (m % 7 == 3) ? 0 : $urandom % 40;
      if (na == 0 && nd == 0) nd = 1;
      message(k2, v, rnd_blocks(na), rnd_blocks(nd), m[1], m % 3 == 2, 0, '0);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (exp_tag.size() != 0 || exp_data.size() != 0) begin
      failures++; $display("FAIL missing results: %0d tags %0d blocks", exp_tag.size(), exp_data.size());
    end
    $display("mechanisms: len-stall=%0d partial=%0d aad=%0d decrypt=%0d back-to-back=%0d rekey=%0d empty=%0d",
             n_stall, n_partial, n_aad, n_decrypt, n_b2b, n_rekey, n_empty);
    checks += 7;
    if (n_empty == 0)   begin failures++; $display("FAIL no empty message"); end
    if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    if (n_partial == 0) begin failures++; $display("FAIL no partial beat"); end
    if (n_aad == 0)     begin failures++; $display("FAIL no AAD beat"); end
    if (n_decrypt == 0) begin failures++; $display("FAIL no decryption"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back messages"); end
    if (n_rekey == 0)   begin failures++; $display("FAIL no key change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
