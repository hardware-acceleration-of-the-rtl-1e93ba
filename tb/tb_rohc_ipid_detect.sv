// tb_rohc_ipid_detect: checks IP-ID behaviour detection.
//
// Streams are generated whose IP-ID follows the RTP SN with a fixed offset,
// either in network byte order or byte-swapped (a little-endian host
// counter), or is random. The context holds the two previous (IP-ID, SN)
// pairs. Expected: a sequential stream in either byte order is found with
// the right NBO and its offset; a jump that matches only the older pair is
// still found; a random IP-ID gives RND = 1, NBO = 1.
`timescale 1ns/1ps
module tb_rohc_ipid_detect;
  int checks = 0, failures = 0;
  logic [15:0] hdr_ipid, hdr_sn, i1, s1, i2, s2, offset;
  logic ctx_nbo, nbo, rnd;

  rohc_ipid_detect dut (.hdr_ipid, .hdr_sn, .ctx_nbo, .ctx_ipid_1(i1), .ctx_sn_1(s1),
                        .ctx_ipid_2(i2), .ctx_sn_2(s2), .nbo, .rnd, .offset);

  function automatic logic [15:0] sw(logic [15:0] v); return {v[7:0], v[15:8]}; endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] off, sn0, step;
      bit swapped;
      int kind;
      kind    = n % 4;
      swapped = 1'($urandom);
      off     = 16'($urandom);
      sn0     = 16'($urandom);
      step    = 16'(1 + $urandom % 5);
      ctx_nbo = 1'($urandom);
      s2 = sn0; s1 = sn0 + 1; hdr_sn = sn0 + 1 + step;
      i2 = swapped ? sw(s2 + off) : s2 + off;
      i1 = swapped ? sw(s1 + off) : s1 + off;
      hdr_ipid = swapped ? sw(hdr_sn + off) : hdr_sn + off;
      if (kind == 1) i1 = 16'($urandom);              // only the older pair matches
      if (kind == 2) hdr_ipid = 16'($urandom);        // random IP-ID
      #1;
      if (kind == 2) begin
        logic [15:0] a, b;
        // a random value can hit the pattern by chance; work out if it did
        a = swapped ? sw(hdr_ipid) : hdr_ipid;
        b = swapped ? hdr_ipid : sw(hdr_ipid);
        if ((a - hdr_sn) != off && (b - hdr_sn) != (sw(i1) - s1) && (b - hdr_sn) != (sw(i2) - s2) &&
            (a - hdr_sn) != ((swapped ? sw(i1) : i1) - s1))
          chk(rnd == 1'b1 && nbo == 1'b1 && offset == hdr_ipid - hdr_sn, "random IP-ID");
      end else begin
        // a swapped stream can also look sequential in network order by chance
        // only when the byte swap is an identity-like pattern; skip those
        if (!(swapped && (sw(hdr_ipid) - hdr_sn) == (sw(i2) - s2) && (hdr_ipid - hdr_sn) == (i2 - s2)))
          chk(rnd == 1'b0 && nbo == !swapped && offset == off,
              $sformatf("kind %0d swapped %0d ctx_nbo %0d: nbo %0d rnd %0d off %h want %h",
                        kind, swapped, ctx_nbo, nbo, rnd, offset, off));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
