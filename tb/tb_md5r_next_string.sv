// tb_md5r_next_string: checks the string incrementer of the search against
// the position formula: for random strings of every length the next string
// must be the one whose position is one higher, carries must lengthen the
// string ("~" -> "  ", "~~~" -> "    "), and the string after the last one of
// the allowed length must be marked as not existing.
module tb_md5r_next_string;
  import md5r_pkg::*;
  import md5_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cand_t mk(string s);
    return '{ok: 1'b1, len: wordlen_t'(s.len() - 1), chars: pack(s)};
  endfunction

  initial begin
    cand_t n;
    string fixed [6] = '{" ", "~", "a~~", "~~~", "~~~~~~~", "Newton"};
    for (int i = 0; i < 1000; i++) begin
      automatic string s = (i < 6) ? fixed[i] : rand_string(8);
      if (s == "~~~~~~~~") continue;
      n = next_string(mk(s), 8);
      check(n.ok && int'(n.len) + 1 == unpack(n.chars).len(), $sformatf("length after \"%s\"", s));
      check(rank(unpack(n.chars)) == rank(s) + 1,
            $sformatf("after \"%s\" comes \"%s\"", s, unpack(n.chars)));
    end
    n = next_string(mk("~~~~~~~~"), 8);
    check(!n.ok, "nothing after eight '~'");
    n = next_string(mk("~~~"), 3);
    check(!n.ok, "nothing after three '~' when the limit is 3");
    n = next_string(mk("~~"), 3);
    check(n.ok && unpack(n.chars) == "   ", "two '~' carry into three spaces");
    n = next_string('{ok: 1'b0, len: '0, chars: pack("a")}, 8);
    check(!n.ok, "a missing string stays missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
