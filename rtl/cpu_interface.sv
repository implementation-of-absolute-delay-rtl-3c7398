// cpu_interface: register interface between the host CPU bus and the core.
//
// The CPU sets the target delay, starts and stops a run and reads the
// delay results. Its bus (cpu_clk, cs, rw, 3-bit addr, 8-bit data, ta_n)
// follows the names of the document's circuit; the bus cycle and the
// register map are this design's choices:
//   - a cycle begins when cs (active high) is seen on a cpu_clk edge; on
//     that edge a write (rw = 0) updates the register, or a read (rw = 1)
//     loads data_o; ta_n then goes low for one cpu_clk cycle to end the
//     transfer, and the interface waits for cs to drop before the next
//     one. data_oe is high while cs and rw are both high (the bidirectional
//     data pins are split into data_i, data_o and data_oe).
//   - registers (add_pkg::reg_addr_e): 0 CTRL (bit0 T start, bit1 P stop,
//     read/write levels), 1 TARGET (target delay in us of the selected
//     class), 2 SEL (bit0 picks DELAY_CNT instead of DELAY_SUM for the
//     result bytes, bits 6:4 select the class for TARGET and the results),
//     3 STATUS (read: bit0 measuring, bit1 a FIFO overflow seen), 4..7
//     RESULT bytes 0..3 of the selected 31-bit result.
//   - with NUM_CLASSES = 1 (the default) the class bits are ignored.
// Clock crossing: T, P and TARGET are passed to the clk domain through
// two-flop synchronisers. A rising edge of T gives one start pulse, a
// rising edge of P one stop pulse (write CTRL = 1 to start, 3 to stop,
// 0 to re-arm). ext_start / ext_stop are the synchronised T and P levels,
// brought out to pins. Results and status are brought into the cpu_clk
// domain through two flops as well; they are meant to be read after a
// stop, when they no longer change.
module cpu_interface
  import add_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = 1
) (
  // CPU bus, cpu_clk domain
  input  logic             cpu_clk,
  input  logic             rst,
  input  logic             cs,
  input  logic             rw,
  input  logic [2:0]       addr,
  input  logic [7:0]       data_i,
  output logic [7:0]       data_o,
  output logic             data_oe,
  output logic             ta_n,
  // core side, clk domain
  input  logic             clk,
  output logic             start,
  output logic             stop,
  output logic [7:0]       target_us [NUM_CLASSES],
  output logic             ext_start,
  output logic             ext_stop,
  input  logic             measuring,
  input  logic             ovf_seen,
  input  logic [DLY_W-1:0] delay_sum [NUM_CLASSES],
  input  logic [DLY_W-1:0] delay_cnt [NUM_CLASSES]
);
  localparam int unsigned CW = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1;

  typedef enum logic [1:0] {B_IDLE, B_ACK, B_WAIT} bus_state_e;

  bus_state_e       bstate;
  logic [1:0]       ctrl;
  logic [7:0]       target_r [NUM_CLASSES];
  logic             sel;
  logic [2:0]       cls_r;     // class field of SEL as written
  logic [CW-1:0]    cls;       // the class it selects
  logic [7:0]       rd_mux;
  logic [DLY_W-1:0] sum_s1 [NUM_CLASSES], sum_s2 [NUM_CLASSES];
  logic [DLY_W-1:0] cnt_s1 [NUM_CLASSES], cnt_s2 [NUM_CLASSES];
  logic [DLY_W-1:0] res;
  logic [1:0]       st_s1, st_s2;

  // ---- cpu_clk domain: bus cycle and registers ---------------------------
  assign cls = (32'(cls_r) < NUM_CLASSES) ? CW'(cls_r) : '0;

  always_comb begin
    res = sel ? cnt_s2[cls] : sum_s2[cls];
    case (reg_addr_e'(addr))
      REG_CTRL:   rd_mux = {6'b0, ctrl};
      REG_TARGET: rd_mux = target_r[cls];
      REG_SEL:    rd_mux = {1'b0, cls_r, 3'b0, sel};
      REG_STATUS: rd_mux = {6'b0, st_s2};
      REG_RES0:   rd_mux = res[7:0];
      REG_RES1:   rd_mux = res[15:8];
      REG_RES2:   rd_mux = res[23:16];
      default:    rd_mux = {1'b0, res[30:24]};
    endcase
  end

  always_ff @(posedge cpu_clk) begin
    if (rst) begin
      bstate   <= B_IDLE;
      ta_n     <= 1'b1;
      data_o   <= '0;
      ctrl     <= '0;
      for (int c = 0; c < int'(NUM_CLASSES); c++) target_r[c] <= '0;
      sel      <= 1'b0;
      cls_r    <= '0;
    end else begin
      ta_n <= 1'b1;
      case (bstate)
        B_IDLE: if (cs) begin
          if (rw) begin
            data_o <= rd_mux;
          end else begin
            case (reg_addr_e'(addr))
              REG_CTRL:   ctrl     <= data_i[1:0];
              REG_TARGET: target_r[cls] <= data_i;
              REG_SEL: begin
                sel   <= data_i[0];
                cls_r <= data_i[6:4];
              end
              default: ;  // read-only registers
            endcase
          end
          ta_n   <= 1'b0;
          bstate <= B_ACK;
        end
        B_ACK:  bstate <= cs ? B_WAIT : B_IDLE;
        B_WAIT: if (!cs) bstate <= B_IDLE;
        default: bstate <= B_IDLE;
      endcase
    end
  end

  assign data_oe = cs && rw;

  // results and status into the cpu_clk domain
  always_ff @(posedge cpu_clk) begin
    sum_s1 <= delay_sum;  sum_s2 <= sum_s1;
    cnt_s1 <= delay_cnt;  cnt_s2 <= cnt_s1;
    st_s1  <= {ovf_seen, measuring};  st_s2 <= st_s1;
  end

  // ---- clk domain: synchronisers and start/stop pulses ------------------
  logic [1:0] ctrl_s1, ctrl_s2, ctrl_s3;
  logic [7:0] tgt_s1 [NUM_CLASSES];

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_s1   <= '0;
      ctrl_s2   <= '0;
      ctrl_s3   <= '0;
      for (int c = 0; c < int'(NUM_CLASSES); c++) begin
        tgt_s1[c]    <= '0;
        target_us[c] <= '0;
      end
    end else begin
      ctrl_s1   <= ctrl;
      ctrl_s2   <= ctrl_s1;
      ctrl_s3   <= ctrl_s2;
      tgt_s1    <= target_r;
      target_us <= tgt_s1;
    end
  end

  assign start     = ctrl_s2[CTRL_T] && !ctrl_s3[CTRL_T];
  assign stop      = ctrl_s2[CTRL_P] && !ctrl_s3[CTRL_P];
  assign ext_start = ctrl_s2[CTRL_T];
  assign ext_stop  = ctrl_s2[CTRL_P];

  // one transfer acknowledge per bus cycle
  a_ta_one_cycle: assert property (@(posedge cpu_clk) disable iff (rst)
                                   !ta_n |=> ta_n);
endmodule
