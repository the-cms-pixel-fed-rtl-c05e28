// vme_slave: clock-synchronous VME slave with a local register bus.
//
// All VME inputs pass through vme_filter first. A cycle addressed to the board
// (vme_addr[23:18] == BOARD_ADDR, both data strobes low) becomes one access on
// the local bus: lb_addr is the longword address vme_addr[17:2]; a write
// pulses lb_we with lb_wdata, a read pulses lb_re and takes lb_rdata one
// cycle later. The slave then drives vme_dtack_n low (and, on a read,
// vme_data_out valid with vme_data_oe) until the master releases both
// strobes. Only 32-bit single accesses are handled. The clock-synchronous
// design and the input filter follow the document; the address split and the
// local bus protocol are this design's.
module vme_slave #(
  parameter logic [5:0] BOARD_ADDR = 6'h04,
  parameter int         STABLE     = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [23:0] vme_addr,
  input  logic [31:0] vme_data_in,
  output logic [31:0] vme_data_out,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  output logic [15:0] lb_addr,
  output logic [31:0] lb_wdata,
  output logic        lb_we,
  output logic        lb_re,
  input  logic [31:0] lb_rdata
);
  typedef enum logic [1:0] {V_IDLE, V_READ, V_ACK} vstate_t;

  logic [1:0]  ds_n_f;
  logic        write_n_f;
  logic [23:0] addr_f;
  logic [31:0] data_f;
  vstate_t     state;

  vme_filter #(.WIDTH(3),  .STABLE(STABLE), .INIT(3'b111)) u_fctl (
    .clk, .rst_n, .d({vme_ds_n, vme_write_n}), .q({ds_n_f, write_n_f}));
  vme_filter #(.WIDTH(56), .STABLE(STABLE), .INIT('0)) u_fdat (
    .clk, .rst_n, .d({vme_addr, vme_data_in}), .q({addr_f, data_f}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= V_IDLE;
      lb_addr      <= '0;
      lb_wdata     <= '0;
      lb_we        <= 1'b0;
      lb_re        <= 1'b0;
      vme_dtack_n  <= 1'b1;
      vme_data_oe  <= 1'b0;
      vme_data_out <= '0;
    end else begin
      lb_we <= 1'b0;
      lb_re <= 1'b0;
      case (state)
        V_IDLE:
          if (ds_n_f == 2'b00 && addr_f[23:18] == BOARD_ADDR) begin
            lb_addr  <= addr_f[17:2];
            lb_wdata <= data_f;
            if (!write_n_f) begin
              lb_we <= 1'b1;
              state <= V_ACK;
              vme_dtack_n <= 1'b0;
            end else begin
              lb_re <= 1'b1;
              state <= V_READ;
            end
          end
        V_READ: begin
          // lb_re was high in the previous cycle: data is valid now
          vme_data_out <= lb_rdata;
          vme_data_oe  <= 1'b1;
          vme_dtack_n  <= 1'b0;
          state        <= V_ACK;
        end
        V_ACK:
          if (ds_n_f == 2'b11) begin
            vme_dtack_n <= 1'b1;
            vme_data_oe <= 1'b0;
            state       <= V_IDLE;
          end
        default: state <= V_IDLE;
      endcase
    end
  end
endmodule
