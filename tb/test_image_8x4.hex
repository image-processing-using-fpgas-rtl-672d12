070300
270325
47034a
67036f
870394
a703b9
c703de
e70303
073f28
273f4d
473f72
673f97
873fbc
a73fe1
c73f06
e73f2b
077b50
277b75
477b9a
677bbf
877be4
a77b09
c77b2e
e77b53
07b778
27b79d
47b7c2
67b7e7
87b70c
a7b731
c7b756
e7b77b
