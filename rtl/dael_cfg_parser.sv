// Configuration submodule of a router or NI: interprets the configuration packets that
// arrive over the broadcast configuration tree.
//
// A packet is a header word (flag bit clear, operation code in the payload) followed by
// payload words (flag bit set). All-zero words are padding and are skipped anywhere.
// Every element sees every packet; it acts only on the parts addressed to its own ID.
//
// Path set-up (OP_PATH), as originally described: the header is followed by the
// table of affected slots, MASK_W words whose payloads concatenate (first word = most
// significant bits) into an NSLOTS-bit mask, bit s standing for slot s. Then come pairs
// (element ID, ports). For each pair an element compares the ID with its own: on a match
// it hands the mask and the port word to its slot table (path_upd pulse); on a mismatch it
// rotates its copy of the mask by one slot downward (slot s+1 -> slot s), because the
// path is listed from the destination backward and each hop is one slot earlier.
//
// OP_WRITE (ID, select, value), OP_READ (ID, select) and OP_BUS (ID, BUS_WORDS payloads)
// are this design's own encodings of the other operations the original description lists: writing
// and reading back NI credit counters and flags, and configuring the adjacent bus.
//
// Timing: a word at cw_in is consumed in its cycle; every output is a one-cycle pulse
// registered one cycle after the last word of its command.
module dael_cfg_parser
  import dael_pkg::*;
#(
  parameter int              NSLOTS = 32,
  parameter logic [PL_W-1:0] MY_ID  = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cword_t            cw_in,
  // path set-up / tear-down
  output logic              path_upd,
  output logic [NSLOTS-1:0] path_mask,
  output logic [PL_W-1:0]   path_ports,
  // register write / read
  output logic              wr_valid,
  output logic              rd_valid,
  output logic [PL_W-1:0]   reg_sel,
  output logic [PL_W-1:0]   wr_value,
  // bus configuration word
  output logic              bus_valid,
  output logic [BUS_W-1:0]  bus_word
);

  localparam int MASK_W  = mask_words(NSLOTS);
  localparam int MBITS   = MASK_W * PL_W;
  localparam int BBITS   = BUS_WORDS * PL_W;
  localparam int IDX_W   = $clog2(MASK_W + BUS_WORDS + 4);

  cfg_op_e          op_q;
  logic [IDX_W-1:0] idx_q;      // payload words seen since the header (saturating)
  logic             pair_q;     // path: next word is the port word of a pair
  logic             match_q;    // the current pair / command is addressed to this element
  logic [MBITS-1:0] mask_q;     // affected slots, rotated as pairs go by
  logic [BBITS-1:0] bus_q;

  wire              is_hdr  = !cw_in[CW_W-1] && (cw_in[PL_W-1:0] != '0);
  wire              is_pay  = cw_in[CW_W-1];
  wire [PL_W-1:0]   payload = cw_in[PL_W-1:0];

  // rotate the low NSLOTS bits of the mask down by one slot
  function automatic logic [MBITS-1:0] rotate(logic [MBITS-1:0] m);
    logic [NSLOTS-1:0] s;
    s = m[NSLOTS-1:0];
    s = {s[0], s[NSLOTS-1:1]};
    return MBITS'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q       <= OP_NONE;
      idx_q      <= '0;
      pair_q     <= 1'b0;
      match_q    <= 1'b0;
      mask_q     <= '0;
      bus_q      <= '0;
      path_upd   <= 1'b0;
      path_ports <= '0;
      wr_valid   <= 1'b0;
      rd_valid   <= 1'b0;
      reg_sel    <= '0;
      wr_value   <= '0;
      bus_valid  <= 1'b0;
    end else begin
      path_upd  <= 1'b0;
      wr_valid  <= 1'b0;
      rd_valid  <= 1'b0;
      bus_valid <= 1'b0;
      if (is_hdr) begin
        op_q    <= cfg_op_e'(payload);
        idx_q   <= '0;
        pair_q  <= 1'b0;
        match_q <= 1'b0;
      end else if (is_pay) begin
        if (idx_q != '1) idx_q <= idx_q + 1'b1;
        unique case (op_q)
          OP_PATH: begin
            if (int'(idx_q) < MASK_W) begin
              mask_q <= {mask_q[MBITS-PL_W-1:0], payload};
            end else if (!pair_q) begin
              match_q <= (payload == MY_ID);
              pair_q  <= 1'b1;
            end else begin
              pair_q <= 1'b0;
              if (match_q) begin
                path_upd   <= 1'b1;
                path_ports <= payload;
              end else begin
                mask_q <= rotate(mask_q);
              end
            end
          end
          OP_WRITE, OP_READ: begin
            if (idx_q == 0) match_q <= (payload == MY_ID);
            else if (idx_q == 1) begin
              reg_sel <= payload;
              if (op_q == OP_READ) rd_valid <= match_q;
            end else if (idx_q == 2 && op_q == OP_WRITE) begin
              wr_value <= payload;
              wr_valid <= match_q;
            end
          end
          OP_BUS: begin
            if (idx_q == 0) match_q <= (payload == MY_ID);
            else if (int'(idx_q) <= BUS_WORDS) begin
              bus_q <= {bus_q[BBITS-PL_W-1:0], payload};
              if (int'(idx_q) == BUS_WORDS) bus_valid <= match_q;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign path_mask = mask_q[NSLOTS-1:0];
  assign bus_word  = bus_q[BUS_W-1:0];

endmodule
