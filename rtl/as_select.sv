// Address-space selector and bank map.
//
// Software splits the address space into up to eight ranges by the first octet of
// the lookup address and tells the engine how many ranges there are and where their
// boundaries lie; for firewall / diffserv classification the memories are instead
// chosen by the packet's protocol field (separately for IPv4 and IPv6). Each of the eight logical address spaces is
// then mapped to one of nine physical memory banks: the ninth is the spare into which
// software loads a rebuilt trie, and rewriting one map entry swaps it in. Packets
// capture their bank on entry, so a swap never disturbs a lookup in flight.
//
// Forwarding: space = base + #{ i < count-1 : octet >= bound[i] }, with separate
// boundary sets for IPv4 and IPv6 (IPv6 spaces start at v6_base). Classification:
// space = proto_map[{ipv6, protocol}], and dfirst tells whether that space was built
// destination-first. Selection is combinational; registers are written
// through the configuration bus (sel = CFG_ASSEL):
//   addr[10]=1        proto_map[addr[8:0]]  = wdata[2:0]  (addr[8] = IPv6)
//   addr[9:8]=0       bound_v4[addr[2:0]]   = wdata[7:0]
//   addr[9:8]=1       bound_v6[addr[2:0]]   = wdata[7:0]
//   addr[9:8]=2       addr[1:0]: 0 count_v4, 1 count_v6 (wdata[3:0]), 2 v6_base (wdata[2:0]),
//                     3 order (wdata[7:0], bit s = classification space s is built
//                     destination-first: its first trie walks the destination address)
//   addr[9:8]=3       bank_map[addr[2:0]]   = wdata[3:0]
// Splitting by first octet, software-set boundaries, the spare memory and protocol
// indexing follow the description; the register layout, the separate IPv4/IPv6
// boundary sets and the reset values (one space, identity map) are this design's.
module as_select
  import cls_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic              cls,
  input  logic              ipv6,
  input  logic [7:0]        octet,
  input  logic [7:0]        proto,
  output logic [2:0]        as_id,
  output logic [BANK_W-1:0] bank,
  output logic              dfirst
);

  logic [7:0]        bound_v4 [NUM_AS-1];
  logic [7:0]        bound_v6 [NUM_AS-1];
  logic [3:0]        count_v4, count_v6;
  logic [2:0]        v6_base;
  logic [BANK_W-1:0] bank_map [NUM_AS];
  logic [2:0]        proto_map [512];
  logic [NUM_AS-1:0] order;      // 1: classification space built destination-first

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_AS-1; i++) begin
        bound_v4[i] <= '0;
        bound_v6[i] <= '0;
      end
      for (int i = 0; i < NUM_AS; i++) bank_map[i] <= BANK_W'(i);
      for (int i = 0; i < 512; i++) proto_map[i] <= '0;
      count_v4 <= 4'd1;
      count_v6 <= 4'd1;
      v6_base  <= '0;
      order    <= '0;
    end else if (cfg.we && cfg.sel == CFG_ASSEL) begin
      if (cfg.addr[10]) proto_map[cfg.addr[8:0]] <= cfg.wdata[2:0];
      else begin
        case (cfg.addr[9:8])
          2'd0: if (cfg.addr[2:0] != 3'd7) bound_v4[cfg.addr[2:0]] <= cfg.wdata[7:0];
          2'd1: if (cfg.addr[2:0] != 3'd7) bound_v6[cfg.addr[2:0]] <= cfg.wdata[7:0];
          2'd2: case (cfg.addr[1:0])
                  2'd0: count_v4 <= cfg.wdata[3:0];
                  2'd1: count_v6 <= cfg.wdata[3:0];
                  2'd2: v6_base  <= cfg.wdata[2:0];
                  default: order <= cfg.wdata[NUM_AS-1:0];
                endcase
          default: bank_map[cfg.addr[2:0]] <= cfg.wdata[BANK_W-1:0];
        endcase
      end
    end
  end

  logic [2:0] idx;

  always_comb begin
    idx = '0;
    for (int i = 0; i < NUM_AS-1; i++) begin
      if (ipv6) begin
        if (4'(i) < count_v6 - 4'd1 && octet >= bound_v6[i]) idx = idx + 3'd1;
      end else begin
        if (4'(i) < count_v4 - 4'd1 && octet >= bound_v4[i]) idx = idx + 3'd1;
      end
    end
    if (cls)       as_id = proto_map[{ipv6, proto}];
    else if (ipv6) as_id = v6_base + idx;
    else           as_id = idx;
    bank   = bank_map[as_id];
    dfirst = cls && order[as_id];
  end

endmodule
