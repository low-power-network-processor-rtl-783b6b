// rx_buffer: receive packet buffer (RFIFO) with its extra overflow entry.
//
// Incoming 64-byte mpackets from the network ports are stored together with
// the number of the port they came from. The buffer holds DEPTH regular
// entries plus EXTRA entries of spare room. The regular part being full
// (main_full_o) is the pressure signal that wakes a clock-gated PE; the spare
// entry catches what still arrives while that PE restarts (about 50 cycles,
// well under one mpacket at 1 Gb/s and 232 MHz), so waking a PE costs no
// packet. Only when all DEPTH+EXTRA entries are taken is an arrival dropped.
//
// Entries are kept in arrival order, oldest at index 0. A read names a port and
// removes the oldest mpacket of that port; the entries behind it move up one
// place in the same cycle. port_rdy_o (the port_rdy_status register of the
// interface controller) has bit p set while any stored mpacket belongs to
// port p; it is decoded from the entry registers and so is exact every cycle.
//
// Timing: an arrival (in_valid_i) is stored at the clock edge. A read request
// (rd_req_i, rd_port_i) returns the mpacket on rd_valid_o/rd_data_o in the next
// cycle; a read of a port with nothing stored returns rd_miss_o instead. A read
// and an arrival may happen in the same cycle. The storage, the per-port
// read-out and the status decode are this design's choices; the paper gives
// the mpacket size and the single extra entry.
module rx_buffer #(
  parameter int unsigned NUM_PORTS = np_pkg::NUM_PORTS,
  parameter int unsigned DEPTH     = np_pkg::RFIFO_DEPTH,
  parameter int unsigned EXTRA     = np_pkg::EXTRA_ENTRIES,
  parameter int unsigned DATA_W    = np_pkg::MPKT_W,
  parameter int unsigned PORT_W    = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // arrivals from the network interfaces
  input  logic                 in_valid_i,
  input  logic [PORT_W-1:0]    in_port_i,
  input  logic [DATA_W-1:0]    in_data_i,
  output logic                 in_drop_o,      // arrival lost: every entry taken
  // read by the port scheduler
  input  logic                 rd_req_i,
  input  logic [PORT_W-1:0]    rd_port_i,
  output logic                 rd_valid_o,
  output logic                 rd_miss_o,
  output logic [PORT_W-1:0]    rd_port_o,
  output logic [DATA_W-1:0]    rd_data_o,
  // status
  output logic [NUM_PORTS-1:0] port_rdy_o,
  output logic [$clog2(DEPTH+EXTRA+1)-1:0] count_o,
  output logic                 main_full_o,    // regular entries all taken
  output logic                 extra_used_o    // spare entry occupied
);

  localparam int unsigned TOTAL = DEPTH + EXTRA;
  localparam int unsigned CNT_W = $clog2(TOTAL + 1);
  localparam int unsigned IDX_W = (TOTAL > 1) ? $clog2(TOTAL) : 1;

  typedef struct packed {
    logic [PORT_W-1:0] port;
    logic [DATA_W-1:0] data;
  } entry_t;

  entry_t           ent   [TOTAL];
  logic [TOTAL-1:0] valid;

  // Oldest entry of the requested port.
  logic             hit;
  logic [IDX_W-1:0] hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = TOTAL - 1; i >= 0; i--) begin
      if (valid[i] && ent[i].port == rd_port_i) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  logic do_rd, do_wr;
  assign do_rd = rd_req_i && hit;
  assign do_wr = in_valid_i && (count_o < CNT_W'(TOTAL));
  assign in_drop_o = in_valid_i && !do_wr;

  // Slot the arrival lands in after the optional removal.
  logic [CNT_W-1:0] wr_slot;
  assign wr_slot = count_o - (do_rd ? CNT_W'(1) : CNT_W'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      count_o <= '0;
    end else begin
      for (int i = 0; i < TOTAL; i++) begin
        if (do_wr && CNT_W'(i) == wr_slot) valid[i] <= 1'b1;
        else if (do_rd && i >= int'(hit_idx)) valid[i] <= (i + 1 < TOTAL) ? valid[(i + 1) % TOTAL] : 1'b0;
      end
      count_o <= count_o + CNT_W'(do_wr) - CNT_W'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < TOTAL; i++) begin
      if (do_wr && CNT_W'(i) == wr_slot) begin
        ent[i].port <= in_port_i;
        ent[i].data <= in_data_i;
      end else if (do_rd && i >= int'(hit_idx) && i + 1 < TOTAL) begin
        ent[i] <= ent[(i + 1) % TOTAL];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_o <= 1'b0;
      rd_miss_o  <= 1'b0;
      rd_port_o  <= '0;
      rd_data_o  <= '0;
    end else begin
      rd_valid_o <= do_rd;
      rd_miss_o  <= rd_req_i && !hit;
      if (rd_req_i) rd_port_o <= rd_port_i;
      if (do_rd)    rd_data_o <= ent[hit_idx].data;
    end
  end

  always_comb begin
    port_rdy_o = '0;
    for (int i = 0; i < TOTAL; i++) begin
      if (valid[i]) port_rdy_o[ent[i].port] = 1'b1;
    end
  end

  assign main_full_o  = (count_o >= CNT_W'(DEPTH));
  assign extra_used_o = (count_o >  CNT_W'(DEPTH));

  // Entries stay packed at the low indices.
  logic [TOTAL-1:0] packed_mask;
  always_comb begin
    for (int i = 0; i < TOTAL; i++) packed_mask[i] = (CNT_W'(i) < count_o);
  end
  a_packed: assert property (@(posedge clk) disable iff (!rst_n) valid == packed_mask);

endmodule
