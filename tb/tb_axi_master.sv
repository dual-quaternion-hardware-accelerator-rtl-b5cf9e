// tb_axi_master: AXI4 master bus-functional model used by the testbenches in
// place of the host processor.
//
// It owns one set of AXI4 channel signals (connect them to a slave) and offers
// blocking tasks: write() sends one burst of 32-bit beats with per-beat byte
// strobes, read() fetches one burst. Both check the response (OKAY, matching
// ID, RLAST on the last beat only) and count violations in errors. When
// stall_pct is non-zero, b_ready and r_ready are withheld at random for that
// percentage of cycles, and ready_stalls counts the cycles in which a valid
// response was held back, so that the slave's hold-until-accepted behaviour
// is exercised.
interface tb_axi_master (input logic clk);
  import axi4_pkg::*;

  logic    aw_valid = 1'b0, aw_ready;
  axi_ax_t aw = '0;
  logic    w_valid = 1'b0, w_ready;
  axi_w_t  w = '0;
  logic    b_valid, b_ready = 1'b0;
  axi_b_t  b;
  logic    ar_valid = 1'b0, ar_ready;
  axi_ax_t ar = '0;
  logic    r_valid, r_ready = 1'b0;
  axi_r_t  r;

  int unsigned stall_pct    = 0;
  int unsigned errors       = 0;
  int unsigned ready_stalls = 0;
  int unsigned bursts       = 0;
  logic [AXI_ID_W-1:0] next_id = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data [$],
                       input logic [3:0] strb [$], input burst_e burst = BURST_INCR);
    logic [AXI_ID_W-1:0] id;
    id = next_id++;
    aw_valid <= 1'b1;
    aw <= '{id: id, addr: addr, len: 8'(data.size() - 1), size: 3'd2, burst: burst};
    do @(posedge clk); while (!aw_ready);
    aw_valid <= 1'b0;
    for (int i = 0; i < data.size(); i++) begin
      w_valid <= 1'b1;
      w <= '{data: data[i], strb: strb[i], last: (i == data.size() - 1)};
      do @(posedge clk); while (!w_ready);
    end
    w_valid <= 1'b0;
    forever begin
      b_ready <= ($urandom % 100) >= stall_pct;
      @(posedge clk);
      if (b_valid && b_ready) break;
      if (b_valid) ready_stalls++;
    end
    if (b.id != id || b.resp != RESP_OKAY) errors++;
    b_ready <= 1'b0;
    if (data.size() > 1) bursts++;
  endtask

  task automatic write_words(input logic [31:0] addr, input logic [31:0] data [$]);
    logic [3:0] strb [$];
    foreach (data[i]) strb.push_back(4'hf);
    write(addr, data, strb);
  endtask

  task automatic read(input logic [31:0] addr, input int n, output logic [31:0] data [$],
                      input burst_e burst = BURST_INCR);
    logic [AXI_ID_W-1:0] id;
    int k;
    id = next_id++;
    data = {};
    ar_valid <= 1'b1;
    ar <= '{id: id, addr: addr, len: 8'(n - 1), size: 3'd2, burst: burst};
    do @(posedge clk); while (!ar_ready);
    ar_valid <= 1'b0;
    k = 0;
    while (k < n) begin
      r_ready <= ($urandom % 100) >= stall_pct;
      @(posedge clk);
      if (r_valid && r_ready) begin
        data.push_back(r.data);
        if (r.id != id || r.resp != RESP_OKAY || r.last != (k == n - 1)) errors++;
        k++;
      end else if (r_valid) begin
        ready_stalls++;
      end
    end
    r_ready <= 1'b0;
    if (n > 1) bursts++;
  endtask

  task automatic read_word(input logic [31:0] addr, output logic [31:0] value);
    logic [31:0] d [$];
    read(addr, 1, d);
    value = d[0];
  endtask

endinterface
