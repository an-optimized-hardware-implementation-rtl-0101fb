// grain_y_transform_tb: checks the three-way split of y.  Three copies see
// a random register window x, x moved down by one and x moved down by two,
// as the parts would when a bit passes positions 127, 126 and 125; the XOR
// of y127, y126 and y125 must equal the full pre-output function of x,
// computed here from its definition.  Walking ones check that each part
// holds exactly its own linear terms (none, b72 b1, and s91 b87 b13 b34 b43
// b62).  Purely combinational; a watchdog guards the run anyway.
module grain_y_transform_tb;
  logic [97:0] bw, sw;
  logic [2:0]  p127, p126, p125;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 3; k++) begin : g_dut
    grain_y_transform dut (
      .b(bw[k +: 96]), .s(sw[k +: 95]),
      .y127(p127[k]), .y126(p126[k]), .y125(p125[k])
    );
  end

  function automatic bit full_y(logic [97:0] bb, logic [97:0] ss);
    bit h, l;
    h = (bb[12] && ss[8]) ^ (ss[13] && ss[20]) ^ (bb[95] && ss[42]) ^
        (ss[60] && ss[79]) ^ (bb[12] && bb[95] && ss[94]);
    l = ss[93] ^ bb[2] ^ bb[15] ^ bb[36] ^ bb[45] ^ bb[64] ^ bb[73] ^ bb[89];
    return h ^ l;
  endfunction

  task automatic chk(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 96; k++) begin
      bw = '0; sw = '0; bw[k] = 1'b1; #1;
      chk(p127[0], 1'b0, $sformatf("y127 b one %0d", k));
      chk(p126[0], k == 72 || k == 1, $sformatf("y126 b one %0d", k));
      chk(p125[0], k == 87 || k == 13 || k == 34 || k == 43 || k == 62,
          $sformatf("y125 b one %0d", k));
      bw = '0; sw[k] = 1'b1; #1;
      chk(p127[0], 1'b0, $sformatf("y127 s one %0d", k));
      chk(p126[0], 1'b0, $sformatf("y126 s one %0d", k));
      chk(p125[0], k == 91, $sformatf("y125 s one %0d", k));
    end
    for (int r = 0; r < 4000; r++) begin
      for (int w = 0; w < 3; w++) begin
        bw[w*32 +: 32] = $urandom;
        sw[w*32 +: 32] = $urandom;
      end
      bw[97:96] = 2'($urandom);
      sw[97:96] = 2'($urandom);
      #1;
      chk(p127[0] ^ p126[1] ^ p125[2], full_y(bw, sw), $sformatf("sum, run %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
