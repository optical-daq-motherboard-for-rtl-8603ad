// tb_dummy_data_gen: packets from the dummy board data source.
//
// L1A_MATCH pulses arrive at random, some during a packet. The testbench
// checks that every match yields one packet of NWORDS consecutive words in
// the format {last, 0, ID, word index, packet number}, with the last flag
// only on the final word, packet numbers counting up, and no lost request.
module tb_dummy_data_gen;
  localparam int NW = 5;
  logic clk = 0, rst = 1, m = 0, dv;
  logic [17:0] dout;
  int checks = 0, failures = 0, nreq = 0, npkt = 0, w = 0;

  always #5 clk = !clk;

  dummy_data_gen #(.NWORDS(NW), .ID(4'd6)) dut (.clk, .rst, .l1a_match(m), .dout, .dv);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst && dv) begin
    check(dout == {(w == NW - 1), 1'b0, 4'd6, 4'(w), 8'(npkt)}, $sformatf("word %h pkt %0d idx %0d", dout, npkt, w));
    if (w == NW - 1) begin w = 0; npkt++; end else w++;
  end

  initial begin
    int gap;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 40; k++) begin
      m = 1; nreq++; @(negedge clk); m = 0;
      gap = $urandom % 12;
      repeat (gap) @(negedge clk);
    end
    repeat (40 * NW + 20) @(negedge clk);
    check(npkt == nreq, $sformatf("packets %0d requests %0d", npkt, nreq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
