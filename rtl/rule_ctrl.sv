// rule_ctrl: register slave through which the host manages the firewall rules.
//
// The host (through the board's PCIe register path) writes a rule into
// staging registers and then commits it to one TCAM slot with a command
// register.  Rules can be inserted and removed at any time, also while
// traffic flows; a commit takes effect for lookups two cycles after the
// command write completes.  That rules are inserted and removed from the host
// at run time follows the design; the bus (AXI4-Lite), the register map and
// the staging scheme are this design's choices.
//
// Register map (32-bit registers, byte addresses):
//   0x00..0x10  KEY[0..4]   rule value, KEY[0] holds key bits 31:0
//   0x20..0x30  MASK[0..4]  care mask, 1 = bit compared, 0 = wildcard
//   0x40        INDEX       TCAM slot the command acts on
//   0x44        CMD         write bit0 = 1: insert KEY/MASK at INDEX;
//                           write bit1 = 1: remove the rule at INDEX
//   0x48        INFO        read only: number of rule slots
// Key bit layout is fw_pkg::fw_key_t (teid in bits 31:0, proto in 39:32,
// dst_port 55:40, src_port 71:56, dst_ip 103:72, src_ip 135:104).
// Staging registers read back; CMD reads 0.  Byte strobes are ignored (whole
// 32-bit writes).  The slave takes one write and one read at a time: a write
// completes when both AW and W were seen; B is returned the next cycle.
module rule_ctrl
  import fw_pkg::*;
#(
  parameter int unsigned N_RULES = 512,
  localparam int unsigned IDX_W  = (N_RULES > 1) ? $clog2(N_RULES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // AXI4-Lite slave
  input  logic [7:0]       s_awaddr,
  input  logic             s_awvalid,
  output logic             s_awready,
  input  logic [31:0]      s_wdata,
  input  logic [3:0]       s_wstrb,
  input  logic             s_wvalid,
  output logic             s_wready,
  output logic [1:0]       s_bresp,
  output logic             s_bvalid,
  input  logic             s_bready,
  input  logic [7:0]       s_araddr,
  input  logic             s_arvalid,
  output logic             s_arready,
  output logic [31:0]      s_rdata,
  output logic [1:0]       s_rresp,
  output logic             s_rvalid,
  input  logic             s_rready,
  // TCAM write port
  output logic             wr_en,
  output logic [IDX_W-1:0] wr_idx,
  output logic             wr_valid,
  output fw_key_t          wr_value,
  output fw_key_t          wr_mask
);

  localparam int unsigned PAD_W = KEY_WORDS * 32;

  logic [31:0] key_q  [KEY_WORDS];
  logic [31:0] mask_q [KEY_WORDS];
  logic [IDX_W-1:0] index_q;

  // write channel: latch address and data separately, act when both are held
  logic       aw_held_q, w_held_q;
  logic [7:0] awaddr_q;
  logic [31:0] wdata_q;

  assign s_awready = !aw_held_q && !s_bvalid;
  assign s_wready  = !w_held_q  && !s_bvalid;
  assign s_bresp   = 2'b00;

  wire do_write = aw_held_q && w_held_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_held_q <= 1'b0;
      w_held_q  <= 1'b0;
      awaddr_q  <= '0;
      wdata_q   <= '0;
      s_bvalid  <= 1'b0;
      index_q   <= '0;
      wr_en     <= 1'b0;
      wr_valid  <= 1'b0;
      for (int i = 0; i < int'(KEY_WORDS); i++) begin
        key_q[i]  <= '0;
        mask_q[i] <= '0;
      end
    end else begin
      wr_en <= 1'b0;
      if (s_awvalid && s_awready) begin
        aw_held_q <= 1'b1;
        awaddr_q  <= s_awaddr;
      end
      if (s_wvalid && s_wready) begin
        w_held_q <= 1'b1;
        wdata_q  <= s_wdata;
      end
      if (do_write) begin
        aw_held_q <= 1'b0;
        w_held_q  <= 1'b0;
        s_bvalid  <= 1'b1;
        for (int i = 0; i < int'(KEY_WORDS); i++) begin
          if (awaddr_q == REG_KEY0  + 8'(4 * i)) key_q[i]  <= wdata_q;
          if (awaddr_q == REG_MASK0 + 8'(4 * i)) mask_q[i] <= wdata_q;
        end
        if (awaddr_q == REG_INDEX) index_q <= wdata_q[IDX_W-1:0];
        if (awaddr_q == REG_CMD && (wdata_q[0] || wdata_q[1])) begin
          wr_en    <= 1'b1;
          wr_valid <= wdata_q[0] && !wdata_q[1];   // remove wins over insert
        end
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
    end
  end

  // staging registers flattened to the key width
  logic [PAD_W-1:0] key_flat, mask_flat;
  always_comb begin
    for (int i = 0; i < int'(KEY_WORDS); i++) begin
      key_flat[32*i +: 32]  = key_q[i];
      mask_flat[32*i +: 32] = mask_q[i];
    end
  end

  assign wr_idx   = index_q;
  assign wr_value = key_flat[KEY_W-1:0];
  assign wr_mask  = mask_flat[KEY_W-1:0];

  // read channel
  assign s_arready = !s_rvalid;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= '0;
        for (int i = 0; i < int'(KEY_WORDS); i++) begin
          if (s_araddr == REG_KEY0  + 8'(4 * i)) s_rdata <= key_q[i];
          if (s_araddr == REG_MASK0 + 8'(4 * i)) s_rdata <= mask_q[i];
        end
        if (s_araddr == REG_INDEX) s_rdata <= 32'(index_q);
        if (s_araddr == REG_INFO)  s_rdata <= 32'(N_RULES);
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
