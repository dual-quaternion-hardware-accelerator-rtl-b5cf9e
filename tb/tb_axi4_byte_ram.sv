// tb_axi4_byte_ram: self-checking test of the AXI4 Byte-RAM slave.
//
// An AXI4 master model writes and reads the register space with bursts and
// random response back-pressure and checks: operand words read back as
// written; byte strobes update only their lanes; a FIXED burst stays on one
// word; the result area is read-only; unmapped addresses read zero; writing
// CTRL gives exactly one start pulse; STATUS shows busy and the done flag,
// which a result store sets and the next start clears; the operand outputs
// follow the registers; every response is OKAY with the right ID and RLAST.
module tb_axi4_byte_ram;
  import axi4_pkg::*;

  localparam int NE = 8;   // the module default: a dual quaternion per operand
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy = 1'b0, res_we = 1'b0;
  logic [NE-1:0][31:0] opa, opb, res = '0;
  int   checks = 0, failures = 0, starts = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;

  tb_axi_master m (.clk);

  axi4_byte_ram dut (
    .clk, .rst_n,
    .aw_valid(m.aw_valid), .aw_ready(m.aw_ready), .aw(m.aw),
    .w_valid(m.w_valid), .w_ready(m.w_ready), .w(m.w),
    .b_valid(m.b_valid), .b_ready(m.b_ready), .b(m.b),
    .ar_valid(m.ar_valid), .ar_ready(m.ar_ready), .ar(m.ar),
    .r_valid(m.r_valid), .r_ready(m.r_ready), .r(m.r),
    .start_o(start), .busy_i(busy), .opa_o(opa), .opb_o(opb),
    .res_we_i(res_we), .res_i(res)
  );

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [31:0] wa [$], wb [$], rd [$], v;
    logic [3:0]  st [$];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    m.stall_pct = 30;

    for (int i = 0; i < NE; i++) begin
      wa.push_back($urandom);
      wb.push_back($urandom);
    end
    m.write_words(32'h40, wa);
    m.write_words(32'h80, wb);
    m.read(32'h40, NE, rd);
    foreach (rd[i]) chk(rd[i] == wa[i], $sformatf("opa[%0d] %h expected %h", i, rd[i], wa[i]));
    m.read(32'h80, NE, rd);
    foreach (rd[i]) chk(rd[i] == wb[i], $sformatf("opb[%0d] %h expected %h", i, rd[i], wb[i]));
    for (int i = 0; i < NE; i++) begin
      chk(opa[i] == wa[i], $sformatf("opa_o[%0d]", i));
      chk(opb[i] == wb[i], $sformatf("opb_o[%0d]", i));
    end

    // byte strobes
    m.write(32'h84, '{32'h11223344, 32'hAABBCCDD}, '{4'b0101, 4'b1000});
    m.read(32'h84, 2, rd);
    chk(rd[0] == {wb[1][31:24], 8'h22, wb[1][15:8], 8'h44}, $sformatf("strobe merge %h", rd[0]));
    chk(rd[1] == {8'hAA, wb[2][23:0]}, $sformatf("strobe merge %h", rd[1]));

    // FIXED burst: all beats to one word, the last one stays
    m.write(32'h48, '{32'h1, 32'h2, 32'h3}, '{4'hf, 4'hf, 4'hf}, BURST_FIXED);
    m.read(32'h44, 3, rd);
    chk(rd[0] == wa[1] && rd[1] == 32'h3 && rd[2] == wa[3], "fixed burst write");
    m.read(32'h48, 2, rd, BURST_FIXED);
    chk(rd[0] == 32'h3 && rd[1] == 32'h3, "fixed burst read");

    // unmapped and read-only locations
    m.read_word(32'h20, v);
    chk(v == 32'h0, "unmapped reads zero");
    m.write_words(32'hC0, '{32'hdeadbeef});
    m.read_word(32'hC0, v);
    chk(v == 32'h0, "result area is read-only");

    // start pulse, busy, done
    chk(starts == 0, "no start yet");
    m.write_words(32'h00, '{32'h1});
    repeat (2) @(posedge clk);
    chk(starts == 1, $sformatf("one start pulse, saw %0d", starts));
    m.write_words(32'h00, '{32'h0});
    repeat (2) @(posedge clk);
    chk(starts == 1, "writing 0 to CTRL does not start");
    busy <= 1'b1;
    m.read_word(32'h04, v);
    chk(v == 32'h1, $sformatf("status busy %h", v));
    for (int i = 0; i < NE; i++) res[i] <= 32'h1000 + i;
    busy <= 1'b0;
    res_we <= 1'b1;
    @(posedge clk);
    res_we <= 1'b0;
    m.read_word(32'h04, v);
    chk(v == 32'h2, $sformatf("status done %h", v));
    m.read(32'hC0, NE, rd);
    foreach (rd[i]) chk(rd[i] == 32'h1000 + i, $sformatf("res[%0d] %h", i, rd[i]));
    m.write_words(32'h00, '{32'h1});
    repeat (2) @(posedge clk);
    m.read_word(32'h04, v);
    chk(v == 32'h0, $sformatf("done cleared by start %h", v));

    chk(m.errors == 0, $sformatf("%0d protocol errors", m.errors));
    chk(m.ready_stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
