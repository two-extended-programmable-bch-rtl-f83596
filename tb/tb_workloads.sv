// tb_workloads: runs the decoder top level at the other sizes that were
// evaluated for it, next to the default run of tb_bch_soft_decoder_top:
//   BCH(255,239,2) with p = 4 and p = 6 extra bits (8 and 10 sorted bits);
//   BCH(255,247,1) and BCH(255,231,3) with p = 2;
//   BCH(511,502,1) and BCH(511,484,3) over GF(2^9) with p = 2 (field
//   polynomial x^9+x^4+1, a primitive polynomial chosen by this design).
// Each size is one soft_decoder_bench instance with its own clock and
// reference model (see that file for the error scenarios and the latency and
// mechanism checks). The six run at the same time; when all are done the
// counts are summed and printed. A watchdog ends the run if one hangs.
module tb_workloads;
  localparam int NB = 6;
  logic done [NB];
  int   chk  [NB];
  int   fail [NB];

  soft_decoder_bench #(.P(4), .NFRAMES(18)) u_p4 (
    .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  soft_decoder_bench #(.P(6), .NFRAMES(12)) u_p6 (
    .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  soft_decoder_bench #(.T(3), .P(2), .NFRAMES(18)) u_n255_t3 (
    .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  soft_decoder_bench #(.M(9), .POLY('h211), .N(511), .T(3), .P(2), .NFRAMES(18)) u_n511_t3 (
    .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  soft_decoder_bench #(.T(1), .P(2), .NFRAMES(18)) u_n255_t1 (
    .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  soft_decoder_bench #(.M(9), .POLY('h211), .N(511), .T(1), .P(2), .NFRAMES(18)) u_n511_t1 (
    .done(done[5]), .checks(chk[5]), .failures(fail[5]));

  function automatic bit all_done();
    for (int i = 0; i < NB; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  function automatic void report(int extra_fail);
    int c, f;
    c = 0;
    f = extra_fail;
    for (int i = 0; i < NB; i++) begin
      c += chk[i];
      f += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  // Watchdog in simulated time: the longest run (p = 6) needs about 16,000
  // cycles of 10 ns.
  initial begin
    #(10 * 200000);
    $display("FAIL: watchdog");
    report(1);
    $finish;
  end

  initial begin
    #1;
    while (!all_done()) #10;
    report(0);
    $finish;
  end
endmodule
