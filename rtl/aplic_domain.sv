// One interrupt domain of the APLIC, in direct delivery mode for one hart.
//
// N_SRC wired sources, numbered 1..N_SRC. A source belongs to this domain
// when src_avail is set for it (the root domain owns all; a child owns those
// the parent delegated). Per source, sourcecfg selects:
//   D=1 (root only)  delegate the source to the child domain (deleg_o)
//   SM=0 inactive, 1 detached (software only), 4/5 edge rising/falling,
//   6/7 level high/low.
// Edge sources set their pending bit on their active edge of the input,
// level sources follow the rectified input (input XOR inverted sense),
// and software can set (edge, detached) or clear pending bits. Enabled pending
// sources compete by priority (target register, lower wins, 0 written as 1;
// ties go to the lower source number); with a non-zero ithreshold only
// priorities below it qualify. eip is raised while domaincfg.IE and
// idelivery are set and a source qualifies (or iforce is set). Reading
// claimi returns topi and clears the winner's pending bit.
//
// Register bus offsets (RISC-V AIA layout, one domain):
//   0x0000 domaincfg   0x0004+4(i-1) sourcecfg[i]   0x1C00 setip  0x1CDC setipnum
//   0x1D00 in_clrip    0x1DDC clripnum   0x1E00 setie  0x1EDC setienum
//   0x1F00 clrie       0x1FDC clrienum   0x3004+4(i-1) target[i]
//   0x4000 idelivery   0x4004 iforce     0x4008 ithreshold 0x4018 topi 0x401C claimi
// A read is sel with we low; rdata is combinational, side effects happen at
// the clock edge. The design gives the APLIC's source count (8) and its role,
// delegating interrupts; the register layout and behaviour are taken from the
// RISC-V Advanced Interrupt Architecture, reduced to direct mode, one hart
// and source numbers that fit one 32-bit word.
module aplic_domain #(
  parameter int unsigned N_SRC   = 8,
  parameter bit          IS_ROOT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  logic             we,
  input  logic [14:0]      addr,
  input  logic [31:0]      wdata,
  output logic [31:0]      rdata,
  input  logic [N_SRC:1]   src_i,
  input  logic [N_SRC:1]   src_avail,
  output logic [N_SRC:1]   deleg_o,
  output logic             eip
);
  logic          ie_q;
  logic          deleg_q [N_SRC+1];
  logic [2:0]    sm_q    [N_SRC+1];
  logic [7:0]    prio_q  [N_SRC+1];
  logic [N_SRC:1] ip_q, en_q, rect, src_prev_q, active, edge_src, level_src, edge_hit;
  logic          idelivery_q, iforce_q;
  logic [7:0]    ithreshold_q;
  logic [31:0]   topi;
  logic [9:0]    top_id;
  logic [7:0]    top_prio;
  logic          wr, rd;

  assign wr = sel && we;
  assign rd = sel && !we;

  for (genvar i = 1; i <= N_SRC; i++) begin : g_src
    assign active[i]    = src_avail[i] && !deleg_q[i] && (sm_q[i] != 3'd0);
    assign rect[i]      = src_i[i] ^ (sm_q[i] == 3'd5 || sm_q[i] == 3'd7);
    assign edge_src[i]  = active[i] && (sm_q[i] == 3'd4 || sm_q[i] == 3'd5);
    assign level_src[i] = active[i] && (sm_q[i] == 3'd6 || sm_q[i] == 3'd7);
    assign deleg_o[i]   = src_avail[i] && deleg_q[i];
    // Edges are taken on the raw input so that changing the mode is no edge
    assign edge_hit[i]  = (sm_q[i] == 3'd4) ? (src_i[i] && !src_prev_q[i])
                                            : (!src_i[i] && src_prev_q[i]);
  end

  // Highest-priority qualifying source
  always_comb begin
    top_id   = '0;
    top_prio = '0;
    for (int i = N_SRC; i >= 1; i--) begin
      if (ip_q[i] && en_q[i] && active[i] &&
          (ithreshold_q == 8'd0 || prio_q[i] < ithreshold_q) &&
          (top_id == '0 || prio_q[i] <= top_prio)) begin
        top_id   = 10'(i);
        top_prio = prio_q[i];
      end
    end
    topi = (top_id == '0) ? 32'd0 : {6'd0, top_id, 8'd0, top_prio};
  end

  assign eip = ie_q && idelivery_q && (top_id != '0 || iforce_q);

  function automatic logic [N_SRC:1] num_bit(logic [31:0] n);
    logic [N_SRC:1] m;
    m = '0;
    for (int i = 1; i <= N_SRC; i++) if (n == 32'(i)) m[i] = 1'b1;
    return m;
  endfunction

  // Next pending and enable state
  logic [N_SRC:1] ip_n, en_n;
  always_comb begin
    ip_n = ip_q;
    en_n = en_q;
    for (int i = 1; i <= N_SRC; i++) begin
      if (edge_src[i] && edge_hit[i]) ip_n[i] = 1'b1;
      if (level_src[i]) ip_n[i] = rect[i];
    end
    if (wr) begin
      unique case (addr)
        15'h1C00: ip_n = ip_n | (wdata[N_SRC:1] & ~level_src);
        15'h1CDC: ip_n = ip_n | (num_bit(wdata) & ~level_src);
        15'h1D00: ip_n = ip_n & ~(wdata[N_SRC:1] & ~level_src);
        15'h1DDC: ip_n = ip_n & ~(num_bit(wdata) & ~level_src);
        15'h1E00: en_n = en_n | wdata[N_SRC:1];
        15'h1EDC: en_n = en_n | num_bit(wdata);
        15'h1F00: en_n = en_n & ~wdata[N_SRC:1];
        15'h1FDC: en_n = en_n & ~num_bit(wdata);
        default: ;
      endcase
    end
    // Claim: clear the delivered source (level sources follow their input)
    if (rd && addr == 15'h401C && top_id != '0) begin
      for (int i = 1; i <= N_SRC; i++)
        if (top_id == 10'(i) && !level_src[i]) ip_n[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie_q         <= 1'b0;
      ip_q         <= '0;
      en_q         <= '0;
      src_prev_q   <= '0;
      idelivery_q  <= 1'b0;
      iforce_q     <= 1'b0;
      ithreshold_q <= '0;
      for (int i = 0; i <= N_SRC; i++) begin
        deleg_q[i] <= 1'b0;
        sm_q[i]    <= 3'd0;
        prio_q[i]  <= 8'd1;
      end
    end else begin
      src_prev_q  <= src_i;
      ip_q        <= ip_n & active;
      en_q        <= en_n & active;
      if (wr) begin
        if (addr == 15'h0000) ie_q <= wdata[8];
        for (int i = 1; i <= N_SRC; i++) begin
          if (addr == 15'(32'h0004 + 4 * (i - 1))) begin
            if (IS_ROOT && wdata[10]) begin
              deleg_q[i] <= 1'b1;
              sm_q[i]    <= 3'd0;
            end else begin
              deleg_q[i] <= 1'b0;
              sm_q[i]    <= (wdata[2:0] inside {3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7}) ? wdata[2:0] : 3'd0;
            end
          end
          if (addr == 15'(32'h3004 + 4 * (i - 1)))
            prio_q[i] <= (wdata[7:0] == 8'd0) ? 8'd1 : wdata[7:0];
        end
        unique case (addr)
          15'h4000: idelivery_q  <= wdata[0];
          15'h4004: iforce_q     <= wdata[0];
          15'h4008: ithreshold_q <= wdata[7:0];
          default: ;
        endcase
      end
      // A claim with nothing pending consumes a forced interrupt
      if (rd && addr == 15'h401C && top_id == '0) iforce_q <= 1'b0;
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      15'h0000: rdata = {8'h80, 15'd0, ie_q, 8'd0};
      15'h1C00: rdata = {{(31 - N_SRC){1'b0}}, ip_q, 1'b0};
      15'h1D00: rdata = {{(31 - N_SRC){1'b0}}, rect & active, 1'b0};
      15'h1E00: rdata = {{(31 - N_SRC){1'b0}}, en_q, 1'b0};
      15'h4000: rdata = {31'd0, idelivery_q};
      15'h4004: rdata = {31'd0, iforce_q};
      15'h4008: rdata = {24'd0, ithreshold_q};
      15'h4018: rdata = topi;
      15'h401C: rdata = topi;
      default: begin
        for (int i = 1; i <= N_SRC; i++) begin
          if (addr == 15'(32'h0004 + 4 * (i - 1)) && src_avail[i])
            rdata = deleg_q[i] ? 32'h400 : {29'd0, sm_q[i]};
          if (addr == 15'(32'h3004 + 4 * (i - 1)) && src_avail[i])
            rdata = {24'd0, prio_q[i]};
        end
      end
    endcase
  end
endmodule
