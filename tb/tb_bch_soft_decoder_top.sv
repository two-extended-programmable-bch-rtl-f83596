// End-to-end testbench of bch_soft_decoder_top at its default parameters
// (BCH(255,239,2), GF(2^8), p = 2, q = 2, 6-bit reliabilities).
//
// Each word is a random message, systematically encoded, with errors placed
// according to a scenario and reliabilities chosen so that the 2t+p+2 least
// reliable bits have distinct small values. The same word is streamed into
// both decoders. Each result is compared with a brute-force reference of the
// decoding rule (all 2^(2t+p) flip patterns on the sorted bits; for EHe also
// one further error anywhere, charged 32): decode success, minimum weight,
// sorted locations, and that the reported flips give a codeword. The cycle
// count from the last bit to op_ready is checked (EHe: 2^(2t+p) + max(2t, p+1) +
// 2(t-1)ceil(m/q) + 5 = 81 edges until op_ready rises, seen
// by this testbench one edge later: 82) or required to be the same for every word (EBP).
// Mechanisms counted, each must occur: an error corrected on an extra bit,
// the EHe further error, a decoding failure, a BP solver stall.
module tb_bch_soft_decoder_top;
  import tb_bch_pkg::*;

  localparam int D  = 6;
  localparam int RW = 6;
  localparam int NFRAMES = 60;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             ehe_in_valid, ehe_data_in, ebp_in_valid, ebp_data_in;
  logic [RW-1:0]    ehe_rel_in, ebp_rel_in;
  logic             ehe_in_ready, ehe_op_ready, ebp_in_ready, ebp_op_ready;
  logic [7:0]       ehe_sorted_loc [D];
  logic [7:0]       ebp_sorted_loc [D];
  logic [D-1:0]     ehe_error_locations, ebp_error_locations;
  logic             ehe_extra_error_valid, ehe_decode_ok, ebp_decode_ok;
  logic [7:0]       ehe_extra_error;
  logic [8:0]       ehe_weight, ebp_weight;
  logic [15:0]      ebp_stall_cycles;

  bch_soft_decoder_top dut (.*);

  int checks = 0, failures = 0;
  int n_extra_il = 0, n_ehe_further = 0, n_fail = 0, n_stall = 0, n_ebp_il = 0;

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

  int ehe_lat, ebp_lat, ebp_lat0;

  initial begin
    int low [D+2];
    int sc, nerr;
    tb_init();
    ehe_in_valid = 0; ebp_in_valid = 0;
    ehe_data_in = 0; ebp_data_in = 0; ehe_rel_in = 0; ebp_rel_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    ebp_lat0 = -1;
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

      // Stream the word, r_254 first, into both decoders.
      for (int a = 0; a < 255; a++) begin
        ehe_in_valid <= 1; ebp_in_valid <= 1;
        ehe_data_in  <= rx[254 - a]; ebp_data_in <= rx[254 - a];
        ehe_rel_in   <= RW'(rel[254 - a]); ebp_rel_in <= RW'(rel[254 - a]);
        @(posedge clk);
        check(ehe_in_ready && ebp_in_ready, "decoders ready while receiving");
      end
      ehe_in_valid <= 0; ebp_in_valid <= 0;
      ehe_lat = 0; ebp_lat = 0;
      fork
        begin
          do begin @(posedge clk); ehe_lat++; end while (!ehe_op_ready);
        end
        begin
          do begin @(posedge clk); ebp_lat++; end while (!ebp_op_ready);
        end
      join
      // Results.
      for (int s = 0; s < D; s++) begin
        check(int'(ehe_sorted_loc[s]) == ref_sorted[s], $sformatf("frame %0d EHe sorted %0d: %0d ref %0d rel %0d", f, s, ehe_sorted_loc[s], ref_sorted[s], rel[254-ref_sorted[s]]));
        check(int'(ebp_sorted_loc[s]) == ref_sorted[s], $sformatf("EBP sorted %0d", s));
      end
      check(ehe_decode_ok == ehe_found, $sformatf("frame %0d EHe found %0d ref %0d", f, ehe_decode_ok, ehe_found));
      check(ebp_decode_ok == ebp_found, $sformatf("frame %0d EBP found %0d ref %0d", f, ebp_decode_ok, ebp_found));
      if (ehe_found) begin
        check(int'(ehe_weight) == ehe_min, $sformatf("frame %0d EHe weight %0d ref %0d", f, ehe_weight, ehe_min));
        check(gives_codeword(ehe_error_locations, ehe_sorted_loc, ehe_extra_error_valid,
                             int'(ehe_extra_error)), $sformatf("frame %0d EHe codeword", f));
        if (ehe_extra_error_valid) n_ehe_further++;
        if (ehe_error_locations[D-1:4] != 0) n_extra_il++;
      end else n_fail++;
      if (ebp_found) begin
        check(int'(ebp_weight) == ebp_min, $sformatf("frame %0d EBP weight %0d ref %0d", f, ebp_weight, ebp_min));
        check(gives_codeword(ebp_error_locations, ebp_sorted_loc, 1'b0, 0),
              $sformatf("frame %0d EBP codeword", f));
        if (ebp_error_locations[D-1:4] != 0) n_ebp_il++;
      end else n_fail++;
      if (ebp_stall_cycles != 0) n_stall++;
      // Scenario 4 must be fixed by the further-error rule.
      if (sc == 4) check(ehe_found && ehe_extra_error_valid, "EHe found the further error");
      if (sc == 3) check(ebp_found && ebp_error_locations == 6'b111001, "EBP corrected 2t+p errors");
      check(ehe_lat == 82, $sformatf("EHe latency %0d, expected 82", ehe_lat));
      if (ebp_lat0 < 0) ebp_lat0 = ebp_lat;
      check(ebp_lat == ebp_lat0, $sformatf("EBP latency %0d vs %0d", ebp_lat, ebp_lat0));
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("EHe latency after last bit %0d cycles, EBP %0d cycles", ehe_lat, ebp_lat0);
    $display("mechanisms: extra-bit corrections EHe %0d EBP %0d, EHe further errors %0d, failures %0d, BP stalls %0d",
             n_extra_il, n_ebp_il, n_ehe_further, n_fail, n_stall);
    check(n_extra_il > 0, "EHe corrected an extra bit");
    check(n_ebp_il > 0, "EBP corrected an extra bit");
    check(n_ehe_further > 0, "EHe further error used");
    check(n_fail > 0, "a decoding failure happened");
    check(n_stall > 0, "BP solver stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
