// Self-checking test of as_select: checks reset defaults, programs IPv4 and IPv6
// boundary sets, a protocol map, the destination-first order bits and a bank map
// with the spare bank swapped in, and compares the selected bank and order bit with a
// model computed from the programmed tables.
module as_select_tb;
  import cls_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_t cfg = '0;
  logic cls = 0, ipv6 = 0;
  logic [7:0] octet = '0, proto = '0;
  logic [2:0] as_id;
  logic [BANK_W-1:0] bank;
  logic dfirst;
  int ord;
  int b4 [7], b6 [7], c4, c6, base6, pmap [512], bmap [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  as_select dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .cls(cls), .ipv6(ipv6),
                 .octet(octet), .proto(proto), .as_id(as_id), .bank(bank),
                 .dfirst(dfirst));

  task automatic wr(int addr, int data);
    @(negedge clk);
    cfg.we = 1; cfg.sel = CFG_ASSEL; cfg.addr = CFG_AW'(addr); cfg.wdata = CFG_DW'(data);
    @(negedge clk);
    cfg.we = 0;
  endtask

  function automatic int model(bit c, bit v6, int oct, int pr);
    int a = 0;
    if (c) a = pmap[(v6 ? 256 : 0) + pr];
    else begin
      for (int i = 0; i < (v6 ? c6 : c4) - 1; i++) if (oct >= (v6 ? b6[i] : b4[i])) a++;
      if (v6) a = (a + base6) % 8;
    end
    return bmap[a];
  endfunction

  task automatic sweep(int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      cls = 1'($urandom); ipv6 = 1'($urandom);
      octet = 8'($urandom); proto = 8'($urandom);
      #1;
      checks++;
      if (int'(bank) != model(cls, ipv6, int'(octet), int'(proto))
          || int'(dfirst) != (cls ? (ord >> pmap[(ipv6 ? 256 : 0) + int'(proto)]) & 1 : 0)) begin
        failures++;
        if (failures < 6) $display("cls%0d v6%0d oct %0d proto %0d: bank %0d expected %0d",
                                   cls, ipv6, octet, proto, bank, model(cls, ipv6, int'(octet), int'(proto)));
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (b4[i]) begin b4[i] = 0; b6[i] = 0; end
    foreach (pmap[i]) pmap[i] = 0;
    foreach (bmap[i]) bmap[i] = i;
    c4 = 1; c6 = 1; base6 = 0; ord = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sweep(50);                       // reset: everything in space 0 -> bank 0
    // IPv4: five spaces split at octets 10, 64, 128, 192
    b4[0] = 10; b4[1] = 64; b4[2] = 128; b4[3] = 192; c4 = 5;
    for (int i = 0; i < 4; i++) wr(i, b4[i]);
    wr(32'h200, c4);
    // IPv6: three spaces starting at space 5, split at 0x20 and 0x30
    b6[0] = 8'h20; b6[1] = 8'h30; c6 = 3; base6 = 5;
    wr(32'h100, b6[0]); wr(32'h101, b6[1]);
    wr(32'h201, c6); wr(32'h202, base6);
    // protocol map: TCP -> 1, UDP -> 2, ICMP -> 3
    pmap[6] = 1; pmap[17] = 2; pmap[1] = 3; pmap[256+6] = 4;
    wr(32'h406, 1); wr(32'h411, 2); wr(32'h401, 3); wr(32'h506, 4);
    sweep(400);
    // spaces 1 and 4 built destination-first
    ord = 8'b0001_0010;
    wr(32'h203, ord);
    sweep(400);
    // directed: protocol lookups
    for (int p = 0; p < 512; p++) begin
      @(negedge clk); cls = 1; proto = 8'(p); ipv6 = 1'(p / 256); #1;
      checks++;
      if (int'(bank) != bmap[pmap[p]] || int'(dfirst) != ((ord >> pmap[p]) & 1)) failures++;
    end
    // swap the spare bank (8) in for space 2; old bank 2 becomes the spare
    bmap[2] = 8;
    wr(32'h302, 8);
    sweep(400);
    @(negedge clk); cls = 0; ipv6 = 0; octet = 8'd100; #1;
    checks++;
    if (bank != 4'd8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
