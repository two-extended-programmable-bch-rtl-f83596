// Testbench for ehe_decoder (BCH(255,239,2), p = 2, q = 2, 6-bit
// reliabilities). Each word is a random message, systematically encoded, with
// errors placed by a scenario (none / two in the 2t least reliable bits / one
// more on an extra bit / one far away / five random ones) and reliabilities
// chosen so that the 2t+p+2 least reliable bits have distinct small values.
// Bits are offered through the valid/ready handshake with random gaps; after
// the last bit in_valid is held high and the decoder must refuse input until
// op_ready. Results are compared with a brute-force reference of the
// decoding rule (all 2^(2t+p) flip patterns, optionally one further error
// charged 32): sorted locations, decode success, minimum weight, and that
// the flips give a codeword. op_ready must rise 81 clock edges after the edge
// that takes the last bit. Extra-bit corrections, further errors and failures
// must all occur.
module tb_ehe_decoder;
  import tb_bch_pkg::*;

  localparam int D  = 6;
  localparam int RW = 6;
  localparam int NFRAMES = 36;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             in_valid, data_in, in_ready, op_ready;
  logic [RW-1:0]    rel_in;
  logic [7:0]       sorted_loc [D];
  logic [D-1:0]     error_locations;
  logic             extra_error_valid, decode_ok;
  logic [7:0]       extra_error;
  logic [8:0]       weight;

  ehe_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_extra_il = 0, n_further = 0, n_fail = 0, n_stall = 0, n_ok = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          msg [239];
  bit          cw  [255];
  bit          rx  [255];
  int unsigned rel [255];

  // Reference: sorted arrival indices and minimum weights.
  int   ref_sorted [D];
  int   ehe_min, ebp_min;
  bit   ehe_found, ebp_found;

  function automatic void reference();
    bit          used [255];
    int unsigned s1, s3, t1, t3, w;
    int          pos;
    foreach (used[i]) used[i] = 0;
    for (int s = 0; s < D; s++) begin
      int best;
      best = -1;
      for (int a = 0; a < 255; a++)
        if (!used[a] && (best < 0 || rel[254 - a] < rel[254 - best])) best = a;
      used[best] = 1;
      ref_sorted[s] = best;
    end
    s1 = syn(rx, 1);
    s3 = syn(rx, 3);
    ehe_found = 0; ebp_found = 0;
    ehe_min = 0; ebp_min = 0;
    for (int pat = 0; pat < (1 << D); pat++) begin
      t1 = s1; t3 = s3; w = 0;
      for (int b = 0; b < D; b++) if (pat[b]) begin
        pos = 254 - ref_sorted[b];
        t1 ^= alpha(pos);
        t3 ^= alpha(3 * pos);
        w  += rel[pos];
      end
      if (t1 == 0 && t3 == 0) begin
        if (!ebp_found || w < ebp_min) begin ebp_found = 1; ebp_min = w; end
        if (!ehe_found || w < ehe_min) begin ehe_found = 1; ehe_min = w; end
      end else if (t1 != 0 && t3 == rpow(t1, 3)) begin
        if (!ehe_found || w + 32 < ehe_min) begin ehe_found = 1; ehe_min = w + 32; end
      end
    end
  endfunction

  // Apply a decoder's answer and test that a codeword results.
  function automatic bit gives_codeword(logic [D-1:0] pat, logic [7:0] sl [D],
                                        bit xv, int xloc);
    bit w [255];
    w = rx;
    for (int b = 0; b < D; b++) if (pat[b]) w[254 - sl[b]] ^= 1'b1;
    if (xv) w[254 - xloc] ^= 1'b1;
    return syn(w, 1) == 0 && syn(w, 3) == 0;
  endfunction

  int lat, lat0;

  initial begin
    int low [D+2];
    int sc, nerr;
    tb_init();
    in_valid = 0; data_in = 0; rel_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    lat0 = -1;
    for (int f = 0; f < NFRAMES; f++) begin
      foreach (msg[i]) msg[i] = 1'($urandom);
      encode(msg, cw);
      check(syn(cw, 1) == 0 && syn(cw, 3) == 0, "encoder output is a codeword");
      rx = cw;
      foreach (rel[i]) rel[i] = 24 + $urandom_range(0, 39);
      // D+2 distinct low-reliability positions, reliabilities 2,4,..,16 in
      // random order.
      for (int s = 0; s < D + 2; s++) begin
        bit dup;
        do begin
          low[s] = $urandom_range(0, 254);
          dup = 0;
          for (int u = 0; u < s; u++) if (low[u] == low[s]) dup = 1;
        end while (dup);
      end
      for (int s = 0; s < D + 2; s++) rel[low[s]] = 2 * (s + 1);
      // low[] is ordered by reliability: low[0..3] become the 2t bits,
      // low[4..5] the p extra bits.
      sc = f % 6;
      case (sc)
        0: ;
        1: begin rx[low[$urandom_range(0,1)]] ^= 1; rx[low[$urandom_range(2,3)]] ^= 1; end
        2: begin rx[low[1]] ^= 1; rx[low[2]] ^= 1; rx[low[4]] ^= 1; end
        3: begin rx[low[0]] ^= 1; rx[low[3]] ^= 1; rx[low[4]] ^= 1; rx[low[5]] ^= 1; end
        4: begin
          int far;
          rx[low[1]] ^= 1; rx[low[2]] ^= 1;
          do far = $urandom_range(0, 254); while (rel[far] < 24);
          rx[far] ^= 1;
        end
        default: begin
          for (int e = 0; e < 5; e++) begin
            int pp;
            do pp = $urandom_range(0, 254); while (rel[pp] < 24);
            rx[pp] ^= 1;
          end
        end
      endcase
      reference();

      // Stream the word, r_254 first.
      // Bits are offered with random idle gaps and taken when in_ready is
      // high. After the last bit in_valid stays high: the decoder must not
      // take anything more until op_ready.
      for (int a = 0; a < 255; a++) begin
        @(negedge clk);
        while (f % 2 == 1 && $urandom_range(0, 7) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; data_in = rx[254 - a]; rel_in = RW'(rel[254 - a]);
        check(in_ready, "decoder ready while receiving");
      end
      @(negedge clk);
      data_in = 1'($urandom); rel_in = '0;
      lat = 1;
      while (!op_ready && lat < 2000) begin
        check(!in_ready, "no bit taken while decoding");
        @(negedge clk);
        lat++;
      end
      in_valid = 0;
      // Results.
      for (int s = 0; s < D; s++)
        check(int'(sorted_loc[s]) == ref_sorted[s], $sformatf("frame %0d sorted %0d: %0d ref %0d", f, s, sorted_loc[s], ref_sorted[s]));
      check(decode_ok == ehe_found, $sformatf("frame %0d found %0d ref %0d", f, decode_ok, ehe_found));
      if (ehe_found) begin
        n_ok++;
        check(int'(weight) == ehe_min, $sformatf("frame %0d weight %0d ref %0d", f, weight, ehe_min));
        check(gives_codeword(error_locations, sorted_loc, extra_error_valid, int'(extra_error)),
              $sformatf("frame %0d codeword", f));
        if (extra_error_valid) n_further++;
        if (error_locations[D-1:4] != 0) n_extra_il++;
      end else n_fail++;
      if (sc == 4) check(ehe_found && extra_error_valid, "further error found");
      // lat counts falling edges from the one where the last bit is offered:
      // 81 rising edges after the one that takes it, seen half a cycle later.
      check(lat == 82, $sformatf("latency %0d, expected 82", lat));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("latency after last bit %0d cycles", lat);
    $display("mechanisms: decoded %0d, extra-bit corrections %0d, further errors %0d, failures %0d",
             n_ok, n_extra_il, n_further, n_fail);
    check(n_extra_il > 0, "an extra bit was corrected");
    check(n_further > 0, "further error used");
    check(n_fail > 0, "a decoding failure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
